// maze_world: behavioural model of the robot and its maze for testbenches.
//
// It takes the place of the robot simulator on the host side of the
// controller's link. It builds a random perfect maze of N x N cells
// (recursive backtracking from a fixed seed, so every cell is reachable and
// there are dead ends), feeds the controller the four world wall sensors of
// the robot's cell, applies each returned command to the robot (a step
// through a wall is an error), and predicts every command with its own model
// of the left-hand rule.
//
// Tasks, called from the testbench top:
//   run_maze(inj_var, inj_copy, inj_step, masked, got_there, pos_diverged)
//       one run from cell (0,0) heading north to cell (N-1,N-1). inj_var < 0:
//       no upset; otherwise a bit flip in copy inj_copy of controller variable
//       inj_var at step inj_step. With masked set every command, the
//       two-clock-edge command latency, the position, heading and arrival
//       outputs are checked; otherwise the run only reports whether the
//       reported position departed from the robot's real one.
//   run_stream(len)
//       len random sensor words on consecutive clocks; one command per clock
//       must come back, each as the dead-reckoning model predicts.
// Counters (outputs): checks, failures, and mech[] = left turns, straight
// moves, right turns, turn-backs, arrivals, masked upsets, visible upsets,
// complete back-to-back streams. Controller coordinates are the cell
// coordinates plus BASE, modulo 2^CW.
module maze_world
  import rdt_pkg::*;
#(
  parameter int N    = 8,
  parameter int CW   = 8,
  parameter int BASE = 100,
  parameter int SEED = 1
) (
  input  logic          clk,
  output logic          start,
  output logic [CW-1:0] start_x,
  output logic [CW-1:0] start_y,
  output dir_e          start_dir,
  output logic [CW-1:0] goal_x,
  output logic [CW-1:0] goal_y,
  output logic          sens_valid,
  output logic [3:0]    sens_walls,
  input  logic          cmd_valid,
  input  logic          cmd_stop,
  input  dir_e          cmd_dir,
  input  logic [CW-1:0] pos_x,
  input  logic [CW-1:0] pos_y,
  input  dir_e          heading,
  input  logic          arrived,
  output logic          fi_valid,
  output logic [3:0]    fi_var,
  output logic [1:0]    fi_copy,
  output logic [CW-1:0] fi_mask,
  output int            checks,
  output int            failures,
  output int            mech [8]
);

  localparam int LIMIT = 4 * N * N;   // left-hand rule on a perfect maze needs < 2*N*N

  logic [3:0] wall [N][N];            // wall[x][y][d], d = N,E,S,W

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %m: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int step_x(input int d);
    return (d == 1) ? 1 : (d == 3) ? -1 : 0;
  endfunction
  function automatic int step_y(input int d);
    return (d == 0) ? 1 : (d == 2) ? -1 : 0;
  endfunction

  // Recursive backtracker with an explicit stack and its own LCG.
  task automatic build_maze();
    bit visited [N][N];
    int sx [N*N], sy [N*N];
    int sp, cx, cy, nd, cnt, nx, ny;
    int cand [4];
    int unsigned rnd;
    rnd = SEED;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        wall[x][y] = 4'hF;
        visited[x][y] = 1'b0;
      end
    sp = 0;
    sx[0] = 0; sy[0] = 0; visited[0][0] = 1'b1;
    while (sp >= 0) begin
      cx = sx[sp]; cy = sy[sp];
      cnt = 0;
      for (int d = 0; d < 4; d++) begin
        nx = cx + step_x(d); ny = cy + step_y(d);
        if (nx >= 0 && nx < N && ny >= 0 && ny < N && !visited[nx][ny]) begin
          cand[cnt] = d;
          cnt++;
        end
      end
      if (cnt == 0) begin
        sp--;
      end else begin
        rnd = rnd * 32'd1664525 + 32'd1013904223;
        nd = cand[(rnd >> 16) % cnt];
        nx = cx + step_x(nd); ny = cy + step_y(nd);
        wall[cx][cy][nd] = 1'b0;
        wall[nx][ny][(nd + 2) % 4] = 1'b0;
        visited[nx][ny] = 1'b1;
        sp++;
        sx[sp] = nx; sy[sp] = ny;
      end
    end
  endtask

  initial begin
    checks = 0; failures = 0;
    for (int i = 0; i < 8; i++) mech[i] = 0;
    start = 1'b0; sens_valid = 1'b0; sens_walls = '0;
    fi_valid = 1'b0; fi_var = '0; fi_copy = '0; fi_mask = '0;
    start_x = '0; start_y = '0; goal_x = '0; goal_y = '0; start_dir = DIR_N;
    build_maze();
  end

  task automatic pulse_start();
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  task automatic run_maze(input int inj_var, input int inj_copy, input int inj_step,
                          input bit masked, output bit got_there, output bit pos_diverged);
    int wx, wy, rh, nd, off, lat, steps;
    bit rdone, stop_seen, clean;
    clean = (inj_var < 0);
    got_there = 1'b0;
    pos_diverged = 1'b0;
    start_x = CW'(BASE); start_y = CW'(BASE); start_dir = DIR_N;
    goal_x = CW'(BASE + N - 1); goal_y = CW'(BASE + N - 1);
    pulse_start();
    wx = 0; wy = 0; rh = 0; rdone = 1'b0; stop_seen = 1'b0;
    for (steps = 0; steps < LIMIT && !stop_seen; steps++) begin
      // present one sensor sample; an upset in the sensor variable lands
      // on the edge that stores it, any other upset on the decision edge
      @(negedge clk);
      sens_valid = 1'b1;
      sens_walls = wall[wx][wy];
      if (inj_var == 5 && steps == inj_step) begin
        fi_var = 4'(inj_var); fi_copy = 2'(inj_copy); fi_mask = CW'(1); fi_valid = 1'b1;
      end
      @(negedge clk);
      sens_valid = 1'b0;
      fi_valid = 1'b0;
      if (!clean && inj_var != 5 && steps == inj_step) begin
        fi_var = 4'(inj_var); fi_copy = 2'(inj_copy);
        fi_mask = (inj_var == 6 || inj_var == 8) ? CW'(8'h0F) : (inj_var == 4) ? CW'(1) : CW'(2);
        fi_valid = 1'b1;
      end
      lat = 1;
      while (!cmd_valid && lat < 10) begin
        @(negedge clk);
        fi_valid = 1'b0;
        lat++;
      end
      fi_valid = 1'b0;
      if (masked) expect_true(lat == 2, $sformatf("command latency %0d edges, expected 2", lat));
      // model decision: left, straight, right, back
      if (rdone) begin
        nd = rh;
        off = -1;
      end else begin
        for (off = 3; ; off = (off + 1) % 4) begin
          nd = (rh + off) % 4;
          if (!wall[wx][wy][nd] || off == 2) break;
        end
      end
      if (masked) begin
        expect_true(cmd_stop == rdone, $sformatf("step %0d: stop %b expected %b", steps, cmd_stop, rdone));
        if (!rdone)
          expect_true(int'(cmd_dir) == nd, $sformatf("step %0d: dir %0d expected %0d", steps, cmd_dir, nd));
      end
      if (cmd_stop) begin
        stop_seen = 1'b1;
        got_there = (wx == N - 1) && (wy == N - 1);
        expect_true(got_there && arrived, "stopped away from the goal");
        if (clean && got_there) mech[4]++;
      end else begin
        if (clean && off >= 0) mech[(off + 1) % 4]++;   // 3->0 left, 0->1 straight, 1->2 right, 2->3 back
        if (masked) expect_true(!wall[wx][wy][int'(cmd_dir)], "drove into a wall");
        if (!wall[wx][wy][int'(cmd_dir)]) begin
          wx += step_x(int'(cmd_dir));
          wy += step_y(int'(cmd_dir));
        end
        rh = nd;
        rdone = (wx == N - 1) && (wy == N - 1);
        if (pos_x != CW'(BASE + wx) || pos_y != CW'(BASE + wy)) pos_diverged = 1'b1;
        if (masked) begin
          expect_true(!pos_diverged, $sformatf("step %0d: position %0d,%0d expected %0d,%0d",
                      steps, pos_x, pos_y, CW'(BASE + wx), CW'(BASE + wy)));
          expect_true(int'(heading) == rh, "heading output");
          expect_true(arrived == rdone, "arrived output");
        end else if (pos_diverged) begin
          stop_seen = 1'b1;              // the upset has shown; end the run
        end
      end
    end
    if (masked) expect_true(stop_seen, "never stopped");
    if (!clean && masked && got_there && !pos_diverged) mech[5]++;
    if (!clean && !masked && pos_diverged) mech[6]++;
  endtask

  task automatic run_stream(input int len);
    int rh, px, py, nd, off, got;
    bit rdone;
    logic [3:0] words [256];
    start_x = CW'(BASE); start_y = CW'(BASE); start_dir = DIR_E;
    goal_x = CW'(BASE + 3); goal_y = CW'(BASE + 2);
    pulse_start();
    for (int i = 0; i < len; i++) words[i] = 4'($urandom);
    rh = 1; px = BASE; py = BASE; rdone = 1'b0; got = 0;
    for (int c = 0; c < len + 2; c++) begin
      @(negedge clk);
      if (c >= 2) begin
        // the command for words[c-2] is visible now
        expect_true(cmd_valid, $sformatf("stream: no command in cycle %0d", c));
        if (cmd_valid) got++;
        if (rdone) begin
          expect_true(cmd_stop, "stream: stop expected");
        end else begin
          for (off = 3; ; off = (off + 1) % 4) begin
            nd = (rh + off) % 4;
            if (!words[c - 2][nd] || off == 2) break;
          end
          expect_true(!cmd_stop && int'(cmd_dir) == nd,
                      $sformatf("stream: word %0d dir %0d expected %0d", c - 2, cmd_dir, nd));
          rh = nd;
          px += step_x(nd);
          py += step_y(nd);
          rdone = (CW'(px) == CW'(BASE + 3)) && (CW'(py) == CW'(BASE + 2));
        end
      end
      sens_valid = (c < len);
      sens_walls = (c < len) ? words[c] : 4'h0;
    end
    @(negedge clk);
    sens_valid = 1'b0;
    if (got == len) mech[7]++;
  endtask

endmodule
