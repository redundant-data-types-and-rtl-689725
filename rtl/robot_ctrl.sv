// robot_ctrl: maze-solving robot controller unit with selectable triple
// modular redundancy per variable set. This is the top of the design.
//
// Algorithm. The robot moves on a grid maze and follows the left-hand rule:
// at every cell it turns left if there is no wall on its left, otherwise
// goes straight if the front is open, otherwise turns right, and turns back
// in a dead end. Its four sensors each face one side of the world (N, E, S,
// W), so the controller rotates the sensor word by its own heading to get the
// walls on its left, front and right. It keeps its heading and position by
// dead reckoning and stops once the position equals the goal.
//
// Redundancy. Every program variable is an rdt_var and every operation on
// variables an rdt_op, so each variable set can be given the "triple"
// redundant data type on its own. HARDEN bit k-1 hardens set k:
//   set 1  goal_x, goal_y       target position
//   set 2  pos_x, pos_y         current position
//   set 3  heading              current heading
//   set 4  sens                 sampled wall sensors
//   set 5  view                 sensors rotated into the robot's frame (temporary)
//   set 6  cmd                  command register {stop, direction}
//   set 7  status               goal-reached flag
// An operation is triplicated when one of its operands is hardened. The
// control path (branch decisions, the choice of the turn and of the step
// direction) is not hardened; it reads variables through the Boolean cast or
// the voter. Set 1 being the goal coordinates comes from the evaluated design;
// the other six sets and the operations in them are this design's own
// partition of the controller's variables. The default hardens every set.
//
// Timing. A two-stage pipeline with an initiation interval of one: a sensor
// word presented with sens_valid is stored in the sens variable on that clock
// edge (stage 1), and the decision is made in the next cycle and written on
// the following edge (stage 2), so cmd_valid rises two clock edges after the
// sample was taken and a new sample may be given every cycle. Heading and
// position are updated in stage 2 only, so back-to-back samples see the state
// left by the previous one.
//
// Interface.
//   start                   one-cycle pulse: load start position, start heading
//                           and goal, clear the pipeline (initial state)
//   sens_valid, sens_walls  wall sensors, bit d set = wall in world direction d
//   cmd_valid, cmd_stop,    one command per sample: step one cell in world
//   cmd_dir                 direction cmd_dir, or stay (cmd_stop, goal reached)
//   pos_x, pos_y, heading,  voted state, for observation
//   arrived
//   fi_valid, fi_var,       single-event-upset injection: XOR fi_mask into copy
//   fi_copy, fi_mask        fi_copy of variable fi_var (0 goal_x, 1 goal_y,
//                           2 pos_x, 3 pos_y, 4 heading, 5 sens, 6 view,
//                           7 cmd, 8 status); tie fi_valid low in normal use
// Reset is synchronous and active low. Coordinates wrap modulo 2^COORD_W.
module robot_ctrl
  import rdt_pkg::*;
#(
  parameter int unsigned COORD_W = 8,
  parameter logic [6:0]  HARDEN  = 7'b111_1111
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [COORD_W-1:0] start_x,
  input  logic [COORD_W-1:0] start_y,
  input  dir_e               start_dir,
  input  logic [COORD_W-1:0] goal_x,
  input  logic [COORD_W-1:0] goal_y,
  input  logic               sens_valid,
  input  logic [3:0]         sens_walls,
  output logic               cmd_valid,
  output logic               cmd_stop,
  output dir_e               cmd_dir,
  output logic [COORD_W-1:0] pos_x,
  output logic [COORD_W-1:0] pos_y,
  output dir_e               heading,
  output logic               arrived,
  input  logic               fi_valid,
  input  logic [3:0]         fi_var,
  input  logic [1:0]         fi_copy,
  input  logic [COORD_W-1:0] fi_mask
);

  localparam int unsigned CW = COORD_W;
  localparam bit H_GOAL = HARDEN[0];
  localparam bit H_POS  = HARDEN[1];
  localparam bit H_HEAD = HARDEN[2];
  localparam bit H_SENS = HARDEN[3];
  localparam bit H_VIEW = HARDEN[4];
  localparam bit H_CMD  = HARDEN[5];
  localparam bit H_STAT = HARDEN[6];

  // ---------------------------------------------------------------------
  // Fault-injection masks, one per variable.
  // ---------------------------------------------------------------------
  function automatic logic [2:0][CW-1:0] seu_mask(input logic [3:0] v);
    logic [2:0][CW-1:0] m;
    m = '0;
    if (fi_valid && fi_var == v && fi_copy < 2'd3) m[fi_copy] = fi_mask;
    return m;
  endfunction

  logic [2:0][CW-1:0] seu_gx, seu_gy, seu_px, seu_py, seu_hd, seu_sn, seu_vw, seu_cm, seu_st;
  always_comb begin
    seu_gx = seu_mask(4'd0);
    seu_gy = seu_mask(4'd1);
    seu_px = seu_mask(4'd2);
    seu_py = seu_mask(4'd3);
    seu_hd = seu_mask(4'd4);
    seu_sn = seu_mask(4'd5);
    seu_vw = seu_mask(4'd6);
    seu_cm = seu_mask(4'd7);
    seu_st = seu_mask(4'd8);
  end

  // Narrow the injection masks to each variable's width.
  function automatic logic [2:0][1:0] cut2(input logic [2:0][CW-1:0] m);
    for (int i = 0; i < 3; i++) cut2[i] = m[i][1:0];
  endfunction
  function automatic logic [2:0][3:0] cut4(input logic [2:0][CW-1:0] m);
    for (int i = 0; i < 3; i++) cut4[i] = m[i][3:0];
  endfunction
  function automatic logic [2:0][2:0] cut3(input logic [2:0][CW-1:0] m);
    for (int i = 0; i < 3; i++) cut3[i] = m[i][2:0];
  endfunction
  function automatic logic [2:0] cut1(input logic [2:0][CW-1:0] m);
    for (int i = 0; i < 3; i++) cut1[i] = m[i][0];
  endfunction

  // ---------------------------------------------------------------------
  // Control path (not hardened): pipeline valid bits.
  // ---------------------------------------------------------------------
  logic s1_valid;      // sens holds a sample still to be decided on
  logic go;            // stage 2 acts this cycle
  logic moving;        // stage 2 moves the robot this cycle

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      s1_valid  <= 1'b0;
      cmd_valid <= 1'b0;
    end else begin
      s1_valid  <= sens_valid;
      cmd_valid <= s1_valid;
    end
  end
  assign go = s1_valid && !start;

  // ---------------------------------------------------------------------
  // Variables.
  // ---------------------------------------------------------------------
  logic [2:0][CW-1:0] gx_q, gy_q, px_q, py_q, px_d, py_d;
  logic [2:0][1:0]    hd_q, hd_d;
  logic [2:0][3:0]    sn_q, vw_q, vw_d;
  logic [2:0][2:0]    cm_q, cm_d;
  logic [2:0]         st_q, st_d;

  // set 1: goal
  rdt_var #(.W(CW), .TRIPLE(H_GOAL)) u_goal_x (
    .clk, .rst_n, .we(start), .d({3{goal_x}}), .seu(seu_gx), .q(gx_q));
  rdt_var #(.W(CW), .TRIPLE(H_GOAL)) u_goal_y (
    .clk, .rst_n, .we(start), .d({3{goal_y}}), .seu(seu_gy), .q(gy_q));

  // set 2: position
  rdt_var #(.W(CW), .TRIPLE(H_POS)) u_pos_x (
    .clk, .rst_n, .we(start || moving), .d(px_d), .seu(seu_px), .q(px_q));
  rdt_var #(.W(CW), .TRIPLE(H_POS)) u_pos_y (
    .clk, .rst_n, .we(start || moving), .d(py_d), .seu(seu_py), .q(py_q));

  // set 3: heading
  rdt_var #(.W(2), .TRIPLE(H_HEAD)) u_heading (
    .clk, .rst_n, .we(start || moving), .d(hd_d), .seu(cut2(seu_hd)), .q(hd_q));

  // set 4: sensor sample (stage 1)
  rdt_var #(.W(4), .TRIPLE(H_SENS)) u_sens (
    .clk, .rst_n, .we(sens_valid), .d({3{sens_walls}}), .seu(cut4(seu_sn)), .q(sn_q));

  // set 5: sensors in the robot's frame, temporary of stage 2
  rdt_var #(.W(4), .TRIPLE(H_VIEW), .REGISTERED(1'b0)) u_view (
    .clk, .rst_n, .we(1'b1), .d(vw_d), .seu(cut4(seu_vw)), .q(vw_q));

  // set 6: command
  rdt_var #(.W(3), .TRIPLE(H_CMD)) u_cmd (
    .clk, .rst_n, .we(go), .d(cm_d), .seu(cut3(seu_cm)), .q(cm_q));

  // set 7: goal-reached flag
  rdt_var #(.W(1), .TRIPLE(H_STAT)) u_status (
    .clk, .rst_n, .we(start || moving), .d(st_d), .seu(cut1(seu_st)), .q(st_q));

  // ---------------------------------------------------------------------
  // Stage 2 datapath: operations on (possibly redundant) variables.
  // ---------------------------------------------------------------------
  logic               done;
  logic [2:0][3:0]    hd4;              // heading widened to rotate amount
  logic [2:0][3:0]    left_m, front_m, right_m;
  logic               wall_l, wall_f, wall_r;
  logic [1:0]         turn;             // original-type constant chosen by control
  logic [2:0][1:0]    hd_next;
  logic [1:0]         hd_next_v;
  logic [CW-1:0]      dx, dy;           // original-type step chosen by control
  logic [2:0][CW-1:0] px_next, py_next, eqx, eqy, at_goal;

  rdt_to_bool #(.W(1), .TRIPLE(H_STAT)) u_done (.a(st_q), .y(done));

  always_comb begin
    for (int i = 0; i < 3; i++) hd4[i] = {2'b00, hd_q[i]};
  end

  // view = sens rotated right by heading: bit 0 front, 1 right, 2 back, 3 left
  rdt_op #(.W(4), .OP(OP_ROTR), .TRIPLE(H_SENS || H_HEAD)) u_rot (
    .a(sn_q), .b(hd4), .y(vw_d));

  rdt_op #(.W(4), .OP(OP_AND), .TRIPLE(H_VIEW)) u_mask_l (
    .a(vw_q), .b({3{4'b1000}}), .y(left_m));
  rdt_op #(.W(4), .OP(OP_AND), .TRIPLE(H_VIEW)) u_mask_f (
    .a(vw_q), .b({3{4'b0001}}), .y(front_m));
  rdt_op #(.W(4), .OP(OP_AND), .TRIPLE(H_VIEW)) u_mask_r (
    .a(vw_q), .b({3{4'b0010}}), .y(right_m));

  rdt_to_bool #(.W(4), .TRIPLE(H_VIEW)) u_bool_l (.a(left_m),  .y(wall_l));
  rdt_to_bool #(.W(4), .TRIPLE(H_VIEW)) u_bool_f (.a(front_m), .y(wall_f));
  rdt_to_bool #(.W(4), .TRIPLE(H_VIEW)) u_bool_r (.a(right_m), .y(wall_r));

  // Left-hand rule (control path).
  always_comb begin
    if (!wall_l)      turn = 2'd3;   // turn left
    else if (!wall_f) turn = 2'd0;   // straight on
    else if (!wall_r) turn = 2'd1;   // turn right
    else              turn = 2'd2;   // dead end: turn back
  end

  rdt_op #(.W(2), .OP(OP_ADD), .TRIPLE(H_HEAD)) u_turn (
    .a(hd_q), .b({3{turn}}), .y(hd_next));

  tmr_voter #(.W(2)) u_hd_vote (.copies(hd_next), .voted(hd_next_v), .mismatch());

  // One cell step in the new heading (control path chooses the step).
  always_comb begin
    dx = '0;
    dy = '0;
    unique case (dir_e'(hd_next_v))
      DIR_N: dy = CW'(1);
      DIR_E: dx = CW'(1);
      DIR_S: dy = '1;
      DIR_W: dx = '1;
      default: ;
    endcase
  end

  rdt_op #(.W(CW), .OP(OP_ADD), .TRIPLE(H_POS)) u_step_x (
    .a(px_q), .b({3{dx}}), .y(px_next));
  rdt_op #(.W(CW), .OP(OP_ADD), .TRIPLE(H_POS)) u_step_y (
    .a(py_q), .b({3{dy}}), .y(py_next));

  rdt_op #(.W(CW), .OP(OP_EQ), .TRIPLE(H_POS || H_GOAL)) u_eq_x (
    .a(px_next), .b(gx_q), .y(eqx));
  rdt_op #(.W(CW), .OP(OP_EQ), .TRIPLE(H_POS || H_GOAL)) u_eq_y (
    .a(py_next), .b(gy_q), .y(eqy));
  rdt_op #(.W(CW), .OP(OP_AND), .TRIPLE(H_POS || H_GOAL)) u_at_goal (
    .a(eqx), .b(eqy), .y(at_goal));

  assign moving = go && !done;

  // Values assigned to the variables.
  always_comb begin
    if (start) begin
      px_d = {3{start_x}};
      py_d = {3{start_y}};
      hd_d = {3{2'(start_dir)}};
      st_d = {3{(start_x == goal_x) && (start_y == goal_y)}};
    end else begin
      px_d = px_next;
      py_d = py_next;
      hd_d = hd_next;
      for (int i = 0; i < 3; i++) st_d[i] = at_goal[i][0];
    end
    for (int i = 0; i < 3; i++) cm_d[i] = done ? {1'b1, hd_q[i]} : {1'b0, hd_next[i]};
  end

  // ---------------------------------------------------------------------
  // Outputs (voted).
  // ---------------------------------------------------------------------
  logic [2:0] cmd_v;
  logic [1:0] hd_v;

  tmr_voter #(.W(3))  u_cmd_vote (.copies(cm_q), .voted(cmd_v), .mismatch());
  tmr_voter #(.W(CW)) u_px_vote  (.copies(px_q), .voted(pos_x), .mismatch());
  tmr_voter #(.W(CW)) u_py_vote  (.copies(py_q), .voted(pos_y), .mismatch());
  tmr_voter #(.W(2))  u_hd_out   (.copies(hd_q), .voted(hd_v),  .mismatch());

  assign cmd_stop = cmd_v[2];
  assign cmd_dir  = dir_e'(cmd_v[1:0]);
  assign heading  = dir_e'(hd_v);
  assign arrived  = done;

  // ---------------------------------------------------------------------
  // Interface rules.
  // ---------------------------------------------------------------------
  // An injected upset names an existing variable and copy.
  a_fi_target: assert property (@(posedge clk) disable iff (!rst_n)
    fi_valid |-> (fi_var <= 4'd8) && (fi_copy != 2'd3));
  // Once the goal is reached the robot is told to stay: no sample moves it.
  a_stop_after_goal: assert property (@(posedge clk) disable iff (!rst_n)
    (done && !start && !fi_valid) |=> $stable(pos_x) && $stable(pos_y));
  // Every command answers a sample stored on the previous edge.
  a_cmd_follows_sample: assert property (@(posedge clk) disable iff (!rst_n)
    (s1_valid && !start) |=> cmd_valid);

endmodule
