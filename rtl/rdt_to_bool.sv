// rdt_to_bool: cast of a redundant ("triple") value to a single Boolean.
//
// Conditions of if statements and of the ternary operator need one truth
// value. Each copy is tested for non-zero, and the three results are voted
// two-out-of-three, so a condition is still evaluated correctly when one copy
// is corrupted. With TRIPLE=0 the operand is an original value held in copy 0
// and is tested directly. Combinational, no latency.
//
// The need for the cast follows the description of the triple type; voting
// inside the cast is a choice of this design.
module rdt_to_bool #(
  parameter int unsigned W      = 1,
  parameter bit          TRIPLE = 1'b1
) (
  input  logic [2:0][W-1:0] a,
  output logic              y
);

  logic [2:0] nz;
  logic       voted;

  always_comb begin
    for (int i = 0; i < 3; i++) nz[i] = |a[i];
  end

  tmr_voter #(.W(1)) u_vote (
    .copies  ({nz[2], nz[1], nz[0]}),
    .voted   (voted),
    .mismatch()
  );

  assign y = TRIPLE ? voted : nz[0];

endmodule
