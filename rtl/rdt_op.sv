// rdt_op: one arithmetic or logic operation on redundant ("triple") operands.
//
// An operation whose operands include at least one triple value is itself
// made redundant: the original operation is applied to each copy on its own,
// copy i of the result being op(a[i], b[i]). No vote is taken here; votes
// happen only where a triple value is turned back into an original value
// (rdt_var with TRIPLE=0, rdt_to_bool). An unhardened operand is passed in
// with its value in all three slots, which is the "original-DT" case (triple
// against unhardened); two triple operands give the "intra-DT" case.
//
// TRIPLE=0 describes an operation with no redundant operand: only copy 0 is
// computed and its result is placed in all three slots.
//
// Interface: a, b, y are logic [2:0][W-1:0] bundles; b is ignored by the
// unary operations OP_NOT and OP_MOV. OP_EQ returns 1 or 0 in bit 0.
// Combinational, no latency.
//
// The per-copy semantics follow the description of the triple type; the
// operation set is the one the maze controller needs.
module rdt_op
  import rdt_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter rdt_op_e     OP     = OP_ADD,
  parameter bit          TRIPLE = 1'b1
) (
  input  logic [2:0][W-1:0] a,
  input  logic [2:0][W-1:0] b,
  output logic [2:0][W-1:0] y
);

  function automatic logic [W-1:0] apply(input logic [W-1:0] x, input logic [W-1:0] z);
    logic [W-1:0] r;
    int unsigned  sh;
    sh = int'(z) % W;
    unique case (OP)
      OP_ADD:  r = x + z;
      OP_SUB:  r = x - z;
      OP_AND:  r = x & z;
      OP_OR:   r = x | z;
      OP_XOR:  r = x ^ z;
      OP_NOT:  r = ~x;
      OP_EQ:   r = W'(x == z);
      OP_ROTR: r = (x >> sh) | (x << ((W - sh) % W));
      default: r = x;
    endcase
    return r;
  endfunction

  always_comb begin
    if (TRIPLE) begin
      for (int i = 0; i < 3; i++) y[i] = apply(a[i], b[i]);
    end else begin
      y[0] = apply(a[0], b[0]);
      y[1] = y[0];
      y[2] = y[0];
    end
  end

endmodule
