// rdt_to_bool_tb: self-checking test of the triple-to-Boolean cast.
// For a hardened operand the result must be true when at least two copies
// are non-zero; for an original operand it is copy 0 tested for non-zero.
module rdt_to_bool_tb;
  localparam int unsigned W = 4;
  logic [2:0][W-1:0] a;
  logic y3, y1;
  int checks = 0, failures = 0;

  rdt_to_bool #(.W(W), .TRIPLE(1'b1)) dut3 (.a, .y(y3));
  rdt_to_bool #(.W(W), .TRIPLE(1'b0)) dut1 (.a, .y(y1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nz;
    for (int n = 0; n < 400; n++) begin
      for (int c = 0; c < 3; c++) a[c] = ($urandom % 2) ? W'($urandom) : '0;
      #1;
      nz = 0;
      for (int c = 0; c < 3; c++) if (a[c] != 0) nz++;
      checks++;
      if (y3 !== (nz >= 2)) begin
        failures++;
        $display("FAIL triple cast: %h %h %h -> %b", a[2], a[1], a[0], y3);
      end
      checks++;
      if (y1 !== (a[0] != 0)) begin
        failures++;
        $display("FAIL single cast: %h -> %b", a[0], y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
