// rdt_var: one program variable, stored with or without the triple redundant
// data type.
//
// TRIPLE=1: the variable is hardened. Three independent copies are kept and
// copy i is assigned d[i]; copies are not re-voted on assignment, so each
// copy carries its own history and a corrupted copy is out-voted wherever
// the value is turned back into an original value.
// TRIPLE=0: the variable keeps its original type. A single copy is kept, and
// it is assigned the two-out-of-three vote of d (assigning a triple value to
// an original variable); q carries that one copy in all three slots.
//
// REGISTERED=1 makes a register written on a clock edge when we is high
// (synchronous, active-low reset to RESET_VAL in every copy). REGISTERED=0
// makes a temporary that only lives within one clock cycle: q follows d
// combinationally (with the same vote when unhardened).
//
// seu is a bit-flip mask, one slice per copy, XORed into the stored copies on
// the clock edge (REGISTERED=1) or into the passing value (REGISTERED=0); it
// lets a testbench inject single-event upsets. When unhardened only slice 0
// reaches the single copy. Tie it to zero in normal use.
//
// Copies-per-variable and the vote on conversion follow the triple data type;
// the reset, the write enable and the injection port are this design's own.
module rdt_var #(
  parameter int unsigned W          = 8,
  parameter bit          TRIPLE     = 1'b1,
  parameter bit          REGISTERED = 1'b1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [2:0][W-1:0] d,
  input  logic [2:0][W-1:0] seu,
  output logic [2:0][W-1:0] q
);

  logic [W-1:0]      d_voted;
  logic [2:0][W-1:0] next;

  tmr_voter #(.W(W)) u_vote (
    .copies  (d),
    .voted   (d_voted),
    .mismatch()
  );

  // Value the variable would take after an assignment.
  always_comb begin
    if (TRIPLE) next = d;
    else        next = {3{d_voted}};
  end

  if (REGISTERED) begin : g_reg
    logic [2:0][W-1:0] store;
    if (TRIPLE) begin : g_triple
      always_ff @(posedge clk) begin
        if (!rst_n) store <= {3{RESET_VAL}};
        else        store <= (we ? next : store) ^ seu;
      end
    end else begin : g_single
      always_ff @(posedge clk) begin
        if (!rst_n) store[0] <= RESET_VAL;
        else        store[0] <= (we ? next[0] : store[0]) ^ seu[0];
      end
      assign store[2:1] = {2{store[0]}};
    end
    assign q = store;
  end else begin : g_temp
    // clk, rst_n and we are not used by a temporary.
    if (TRIPLE) begin : g_triple
      assign q = next ^ seu;
    end else begin : g_single
      assign q = {3{next[0] ^ seu[0]}};
    end
  end

endmodule
