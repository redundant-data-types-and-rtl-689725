// tmr_voter: bitwise two-out-of-three majority voter, the decision element of
// triple modular redundancy (TMR).
//
// Each output bit is the value that at least two of the three copies hold, so
// any fault confined to one copy is masked. mismatch is high whenever the
// three copies are not identical, i.e. whenever a copy has been corrupted.
// Purely combinational, no latency.
//
// Majority voting follows the TMR principle the triple data type is based on;
// the mismatch output is an observation aid of this design.
module tmr_voter #(
  parameter int unsigned W = 8
) (
  input  logic [2:0][W-1:0] copies,
  output logic [W-1:0]      voted,
  output logic              mismatch
);

  always_comb begin
    voted    = (copies[0] & copies[1]) | (copies[0] & copies[2]) | (copies[1] & copies[2]);
    mismatch = (copies[0] != copies[1]) || (copies[0] != copies[2]);
  end

endmodule
