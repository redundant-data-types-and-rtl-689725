// robot_ctrl_tb: end-to-end test of the controller in all its hardening
// versions, each in a closed loop with its own maze_world.
//
// Controllers: 0 reference (nothing hardened), 1..7 version k with only
// variable set k hardened, 8 every set hardened. All use the default
// coordinate width.
// Runs: a clean maze run on every controller (exact command sequence,
// two-edge latency, outputs, arrival); an upset in one copy of each variable
// of the hardened set of every version, which must change nothing; an upset in
// the position of the reference, which must show in its reported position;
// a back-to-back stream of sensor words (one per clock) on version 8.
// Every mechanism must occur at least once: left turn, straight move, right
// turn, turn back, arrival, masked upset, visible upset, back-to-back stream.
module robot_ctrl_tb;
  import rdt_pkg::*;

  localparam int NV = 9;
  localparam int CW = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int w_checks [NV];
  int w_fail   [NV];
  int w_mech   [NV][8];
  bit done     [NV];

  for (genvar k = 0; k < NV; k++) begin : g_v
    localparam logic [6:0] HV = (k == 0) ? 7'd0 : (k == 8) ? 7'h7F : 7'(1 << (k - 1));
    logic          start, sens_valid, cmd_valid, cmd_stop, arrived, fi_valid;
    logic [CW-1:0] start_x, start_y, goal_x, goal_y, pos_x, pos_y, fi_mask;
    dir_e          start_dir, cmd_dir, heading;
    logic [3:0]    sens_walls, fi_var;
    logic [1:0]    fi_copy;
    int            mech [8];

    robot_ctrl #(.COORD_W(CW), .HARDEN(HV)) dut (
      .clk, .rst_n, .start, .start_x, .start_y, .start_dir, .goal_x, .goal_y,
      .sens_valid, .sens_walls, .cmd_valid, .cmd_stop, .cmd_dir,
      .pos_x, .pos_y, .heading, .arrived, .fi_valid, .fi_var, .fi_copy, .fi_mask);

    maze_world #(.N(8), .CW(CW), .BASE(100), .SEED(2024)) world (
      .clk, .start, .start_x, .start_y, .start_dir, .goal_x, .goal_y,
      .sens_valid, .sens_walls, .cmd_valid, .cmd_stop, .cmd_dir,
      .pos_x, .pos_y, .heading, .arrived, .fi_valid, .fi_var, .fi_copy, .fi_mask,
      .checks(w_checks[k]), .failures(w_fail[k]), .mech);

    always_comb for (int i = 0; i < 8; i++) w_mech[k][i] = mech[i];

    // Variables of the hardened set: (set 1) 0,1 (2) 2,3 (3) 4 (4) 5
    // (5) 6 (6) 7 (7) 8.
    initial begin : run
      bit ok, div;
      int first, last;
      wait (rst_n);
      world.run_maze(-1, 0, 0, 1'b1, ok, div);
      if (k >= 1 && k <= 7) begin
        first = (k == 1) ? 0 : (k == 2) ? 2 : k + 1;
        last  = (k <= 2) ? first + 1 : first;
        for (int v = first; v <= last; v++) world.run_maze(v, 2, 5 + v, 1'b1, ok, div);
      end
      if (k == 0) world.run_maze(2, 0, 4, 1'b0, ok, div);
      if (k == 8) world.run_stream(40);
      done[k] = 1'b1;
    end
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m [8];
    bit all;
    for (int k = 0; k < NV; k++) done[k] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int k = 0; k < NV; k++) all &= done[k];
    end while (!all);
    for (int i = 0; i < 8; i++) m[i] = 0;
    for (int k = 0; k < NV; k++) begin
      checks += w_checks[k];
      failures += w_fail[k];
      for (int i = 0; i < 8; i++) m[i] += w_mech[k][i];
    end
    $display("mechanisms: left=%0d straight=%0d right=%0d back=%0d arrive=%0d masked=%0d visible=%0d stream=%0d",
             m[0], m[1], m[2], m[3], m[4], m[5], m[6], m[7]);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (m[i] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never happened", i);
      end
    end
    checks++;
    if (m[4] != NV) begin
      failures++;
      $display("FAIL only %0d of %0d controllers arrived", m[4], NV);
    end
    checks++;
    if (m[5] != 9) begin
      failures++;
      $display("FAIL %0d of 9 upsets masked", m[5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
