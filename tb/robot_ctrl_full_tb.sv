// robot_ctrl_full_tb: the controller with every parameter at its default
// (every variable set hardened, 8-bit coordinates) through complete runs of a
// 16 x 16 maze whose coordinates wrap past 255.
// Runs: one clean run (exact commands, two-edge latency, outputs, arrival);
// one run per controller variable with a bit flip in one copy of that
// variable, each of which must be masked; a stream of 200 sensor words on
// consecutive clocks. Every mechanism must occur at least once: left turn,
// straight move, right turn, turn back, arrival, masked upset, back-to-back
// stream (a visible upset needs an unhardened variable and is not expected).
module robot_ctrl_full_tb;
  import rdt_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, sens_valid, cmd_valid, cmd_stop, arrived, fi_valid;
  logic [7:0] start_x, start_y, goal_x, goal_y, pos_x, pos_y, fi_mask;
  dir_e       start_dir, cmd_dir, heading;
  logic [3:0] sens_walls, fi_var;
  logic [1:0] fi_copy;
  int         w_checks, w_fail;
  int         mech [8];
  int         checks = 0, failures = 0;

  robot_ctrl dut (
    .clk, .rst_n, .start, .start_x, .start_y, .start_dir, .goal_x, .goal_y,
    .sens_valid, .sens_walls, .cmd_valid, .cmd_stop, .cmd_dir,
    .pos_x, .pos_y, .heading, .arrived, .fi_valid, .fi_var, .fi_copy, .fi_mask);

  maze_world #(.N(16), .CW(8), .BASE(250), .SEED(77)) world (
    .clk, .start, .start_x, .start_y, .start_dir, .goal_x, .goal_y,
    .sens_valid, .sens_walls, .cmd_valid, .cmd_stop, .cmd_dir,
    .pos_x, .pos_y, .heading, .arrived, .fi_valid, .fi_var, .fi_copy, .fi_mask,
    .checks(w_checks), .failures(w_fail), .mech);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok, div;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    world.run_maze(-1, 0, 0, 1'b1, ok, div);
    for (int v = 0; v < 9; v++) world.run_maze(v, v % 3, 7 + 3 * v, 1'b1, ok, div);
    world.run_stream(200);
    checks = w_checks;
    failures = w_fail;
    $display("mechanisms: left=%0d straight=%0d right=%0d back=%0d arrive=%0d masked=%0d stream=%0d",
             mech[0], mech[1], mech[2], mech[3], mech[4], mech[5], mech[7]);
    for (int i = 0; i < 8; i++) begin
      if (i == 6) continue;
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never happened", i);
      end
    end
    checks++;
    if (mech[5] != 9) begin
      failures++;
      $display("FAIL %0d of 9 upsets masked", mech[5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
