// Reconfiguration manager of the tracking task.
//
// Middle layer of the control architecture for one task, the object
// tracker. It receives from the mission layer start (r) and stop (e)
// requests, the good-performance interval [min_thres, max_thres] and the
// target speed, and from the scheduling layer the measured execution time of
// each completed iteration. Its output is the version to run (run, ver_id,
// plus the version's res/win/wcet) and a no_config notification.
//
// Integration logic: thresholds and speed are latched whenever their valid
// strobes arrive and kept until a step uses them; a step of the automaton is
// invoked in a cycle where r, e or time_valid is high, as the document
// prescribes. A speed report counts as an event for the first step after it
// (window-size objectives apply when the speed changes). The step computes
// c1..c3 with tracking_ctrl and advances tracking_task. cmd_valid is high
// in the cycle right after a step that changed run or ver_id; no_config is held from the
// step that raised it until the next step.
module reconfig_manager
  import amr_pkg::*;
#(
  parameter int TIME_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              r,
  input  logic              e,
  input  logic              time_valid,
  input  logic [TIME_W-1:0] time_i,
  input  logic              thres_valid,
  input  logic [TIME_W-1:0] min_thres_i,
  input  logic [TIME_W-1:0] max_thres_i,
  input  logic              speed_valid,
  input  speed_e            speed_i,
  output logic              run,
  output logic [1:0]        ver_id,
  output logic [ATTR_W-1:0] res,
  output logic [ATTR_W-1:0] win,
  output logic [ATTR_W-1:0] wcet,
  output logic              cmd_valid,
  output logic              no_config,
  output logic              step_o
);
  logic [TIME_W-1:0] min_thres, max_thres;
  speed_e            speed;
  logic              speed_pend;
  logic              step, c1, c2, c3, nocfg_c;
  logic [1:0]        ver_q;

  assign step   = r | e | time_valid;
  assign step_o = step;
  assign cmd_valid = (ver_q != ver_id);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      min_thres  <= '0;
      max_thres  <= '1;
      speed      <= SPEED_NORMAL;
      speed_pend <= 1'b0;
      no_config  <= 1'b0;
      ver_q      <= 2'd0;
    end else begin
      if (thres_valid) begin
        min_thres <= min_thres_i;
        max_thres <= max_thres_i;
      end
      if (speed_valid) begin
        speed      <= speed_i;
        speed_pend <= 1'b1;
      end else if (step) begin
        speed_pend <= 1'b0;
      end
      if (step) no_config <= nocfg_c;
      ver_q     <= ver_id;
    end

  tracking_ctrl #(.TIME_W(TIME_W)) u_ctrl (
    .ver_id, .time_i, .time_evt(time_valid), .min_thres, .max_thres,
    .speed, .speed_evt(speed_pend), .c1, .c2, .c3, .no_config(nocfg_c));

  tracking_task u_task (
    .clk, .rst_n, .step, .r, .c1, .c2, .c3, .e,
    .run, .ver_id, .res, .win, .wcet);

  // the thresholds must bound an interval (assumption of the contract)
  a_interval: assert property (@(posedge clk) disable iff (!rst_n)
      step && run |-> min_thres < max_thres)
    else $error("min_thres >= max_thres");
endmodule
