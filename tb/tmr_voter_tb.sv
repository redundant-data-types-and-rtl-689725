// tmr_voter_tb: self-checking test of the two-out-of-three voter.
// Random copies, copies with one corrupted slot (which must be masked), and
// identical copies; the expected majority is counted bit by bit.
module tmr_voter_tb;
  localparam int unsigned W = 8;
  logic [2:0][W-1:0] copies;
  logic [W-1:0]      voted;
  logic              mismatch;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.copies, .voted, .mismatch);

  task automatic check(input string what);
    logic [W-1:0] exp;
    int ones;
    for (int b = 0; b < W; b++) begin
      ones = int'(copies[0][b]) + int'(copies[1][b]) + int'(copies[2][b]);
      exp[b] = ones >= 2;
    end
    checks++;
    if (voted !== exp) begin
      failures++;
      $display("FAIL %s: copies %h %h %h voted %h expected %h", what, copies[2], copies[1], copies[0], voted, exp);
    end
    checks++;
    if (mismatch !== !(copies[0] == copies[1] && copies[1] == copies[2])) begin
      failures++;
      $display("FAIL %s: mismatch %b", what, mismatch);
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
    for (int n = 0; n < 200; n++) begin
      copies = {W'($urandom), W'($urandom), W'($urandom)};
      #1 check("random");
    end
    for (int n = 0; n < 200; n++) begin
      v = W'($urandom);
      copies = {v, v, v};
      copies[n % 3] = W'($urandom);
      #1 check("single upset");
      checks++;
      if (voted !== v) begin
        failures++;
        $display("FAIL single upset not masked");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
