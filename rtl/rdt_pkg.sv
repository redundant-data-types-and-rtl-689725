// rdt_pkg: shared types of the redundant-data-type (RDT) library and of the
// maze robot controller.
//
// A value of the "triple" redundant data type is carried as three copies,
// logic [2:0][W-1:0], copy 0 in the low slot. An unhardened (original type)
// value uses the same bundle with the one physical value in all three slots,
// so that hardened and unhardened operands can be mixed freely; this bundle
// convention is a choice of this RTL. The operation codes are the original
// operations that the library replicates per copy.
package rdt_pkg;

  // Operations available on triple operands (per copy).
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,  // a + b (modulo 2^W)
    OP_SUB  = 4'd1,  // a - b (modulo 2^W)
    OP_AND  = 4'd2,  // a & b
    OP_OR   = 4'd3,  // a | b
    OP_XOR  = 4'd4,  // a ^ b
    OP_NOT  = 4'd5,  // ~a            (unary)
    OP_EQ   = 4'd6,  // a == b in bit 0, other bits zero
    OP_ROTR = 4'd7,  // a rotated right by b (b taken modulo W)
    OP_MOV  = 4'd8   // a             (unary copy)
  } rdt_op_e;

  // World directions, the order the four chassis sensors use.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

endpackage
