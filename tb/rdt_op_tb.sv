// rdt_op_tb: self-checking test of the per-copy redundant operation.
// Several instances with different operations get random triple operands;
// every copy of every result is compared with the operation applied to that
// copy's operands. Original-type operands are broadcast, and a TRIPLE=0
// instance must place copy 0's result in all three slots.
module rdt_op_tb;
  import rdt_pkg::*;
  localparam int unsigned W = 8;
  localparam int NOPS = 9;
  localparam rdt_op_e OPS [NOPS] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR,
                                    OP_NOT, OP_EQ, OP_ROTR, OP_MOV};
  logic [2:0][W-1:0] a, b;
  logic [2:0][W-1:0] y [NOPS];
  logic [2:0][W-1:0] y_single;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NOPS; g++) begin : g_op
    rdt_op #(.W(W), .OP(OPS[g]), .TRIPLE(1'b1)) dut (.a, .b, .y(y[g]));
  end
  rdt_op #(.W(W), .OP(OP_SUB), .TRIPLE(1'b0)) dut_single (.a, .b, .y(y_single));

  function automatic logic [W-1:0] model(input rdt_op_e op, input logic [W-1:0] x, input logic [W-1:0] z);
    logic [W-1:0] r;
    int sh;
    case (op)
      OP_ADD:  r = W'(int'(x) + int'(z));
      OP_SUB:  r = W'(int'(x) + (1 << W) - int'(z));
      OP_AND:  for (int i = 0; i < W; i++) r[i] = x[i] && z[i];
      OP_OR:   for (int i = 0; i < W; i++) r[i] = x[i] || z[i];
      OP_XOR:  for (int i = 0; i < W; i++) r[i] = x[i] != z[i];
      OP_NOT:  for (int i = 0; i < W; i++) r[i] = !x[i];
      OP_EQ:   r = (x == z) ? W'(1) : W'(0);
      OP_ROTR: begin
        sh = int'(z) % W;
        for (int i = 0; i < W; i++) r[i] = x[(i + sh) % W];
      end
      default: r = x;
    endcase
    return r;
  endfunction

  task automatic check_all();
    #1;
    for (int g = 0; g < NOPS; g++)
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (y[g][c] !== model(OPS[g], a[c], b[c])) begin
          failures++;
          $display("FAIL op %s copy %0d: a=%h b=%h y=%h exp=%h", OPS[g].name(), c, a[c], b[c],
                   y[g][c], model(OPS[g], a[c], b[c]));
        end
      end
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (y_single[c] !== model(OP_SUB, a[0], b[0])) begin
        failures++;
        $display("FAIL single copy %0d", c);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    // intra-DT: independent triple operands
    for (int n = 0; n < 300; n++) begin
      a = {W'($urandom), W'($urandom), W'($urandom)};
      b = {W'($urandom), W'($urandom), W'($urandom)};
      if (n % 4 == 0) b = a;            // exercise equality
      check_all();
    end
    // original-DT: second operand broadcast
    for (int n = 0; n < 100; n++) begin
      v = W'($urandom);
      a = {W'($urandom), W'($urandom), W'($urandom)};
      b = {v, v, v};
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
