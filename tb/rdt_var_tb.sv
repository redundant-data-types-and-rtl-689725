// rdt_var_tb: self-checking test of the variable storage.
// Four instances: hardened and original registers, hardened and original
// temporaries. Checks reset values, write enable, that a hardened register
// keeps the three assigned copies apart, that an original register stores
// the vote of a triple value, and that injected bit flips land in the
// addressed copy (hardened) or in the single copy (original).
module rdt_var_tb;
  localparam int unsigned W = 8;
  localparam logic [W-1:0] RV = 8'h5A;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0][W-1:0] d = '0, seu = '0;
  logic [2:0][W-1:0] q3, q1, t3, t1;
  logic [2:0][W-1:0] e3, e1;   // model of the two registers
  int checks = 0, failures = 0;

  rdt_var #(.W(W), .TRIPLE(1'b1), .RESET_VAL(RV)) dut_r3 (.clk, .rst_n, .we, .d, .seu, .q(q3));
  rdt_var #(.W(W), .TRIPLE(1'b0), .RESET_VAL(RV)) dut_r1 (.clk, .rst_n, .we, .d, .seu, .q(q1));
  rdt_var #(.W(W), .TRIPLE(1'b1), .REGISTERED(1'b0)) dut_t3 (.clk, .rst_n, .we, .d, .seu, .q(t3));
  rdt_var #(.W(W), .TRIPLE(1'b0), .REGISTERED(1'b0)) dut_t1 (.clk, .rst_n, .we, .d, .seu, .q(t1));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] maj(input logic [2:0][W-1:0] c);
    logic [W-1:0] r;
    for (int b = 0; b < W; b++) r[b] = (int'(c[0][b]) + int'(c[1][b]) + int'(c[2][b])) > 1;
    return r;
  endfunction

  task automatic expect_eq(input logic [2:0][W-1:0] got, input logic [2:0][W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] m;
    repeat (2) @(posedge clk);
    #1;
    expect_eq(q3, {3{RV}}, "reset triple");
    expect_eq(q1, {3{RV}}, "reset single");
    e3 = {3{RV}};
    e1 = {3{RV}};
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      we  = ($urandom % 3) != 0;
      d   = {W'($urandom), W'($urandom), W'($urandom)};
      if (n % 2 == 0) d[2] = d[1];
      seu = '0;
      if (n % 5 == 0) seu[n % 3] = W'(1) << (n % W);
      #1;
      // temporaries are combinational
      expect_eq(t3, d ^ seu, "temp triple");
      expect_eq(t1, {3{maj(d) ^ seu[0]}}, "temp single");
      // register model
      if (we) begin
        e3 = d;
        e1 = {3{maj(d)}};
      end
      e3 = e3 ^ seu;
      m  = e1[0] ^ seu[0];
      e1 = {3{m}};
      @(posedge clk);
      #1;
      expect_eq(q3, e3, "register triple");
      expect_eq(q1, e1, "register single");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
