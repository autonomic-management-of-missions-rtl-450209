// Control logic of the tracking-task manager.
//
// Combinational logic that chooses the controllable inputs c1..c3 of the
// tracking automaton at a step so that the control objectives hold:
//   time >= max_thres  =>  the next version has a smaller wcet
//   time <= min_thres  =>  the next version has a larger wcet
//   target speed High  =>  the next version has a larger window
//   target speed Low   =>  the next version has a smaller window
// and the task starts with the version that uses the fewest resources. When
// no objective asks for a change the running version is kept. When a change
// is asked for, the candidate versions are those meeting every active
// objective; among them the one whose wcet is nearest to the running one is
// chosen (ties: fewer resources), which moves one version at a time as in
// the documented behaviour (1 -> 2 -> 3 on slow runs, 3 -> 2 -> 1 on fast
// ones). If no version qualifies, the running one is kept and no_config is
// raised for the mission layer.
//
// The objectives, the assumption min_thres < max_thres and the start rule
// are the document's; the documented controller is produced by discrete
// controller synthesis, and the nearest-wcet selection rule that reproduces
// its documented behaviour is this design's.
//
// Timing: purely combinational; speed_evt tells whether the speed input is
// a fresh report for this step.
module tracking_ctrl
  import amr_pkg::*;
#(
  parameter int TIME_W = 16
) (
  input  logic [1:0]        ver_id,     // running version, 0 = OFF
  input  logic [TIME_W-1:0] time_i,     // measured execution time
  input  logic              time_evt,   // time_i is a new measurement
  input  logic [TIME_W-1:0] min_thres,
  input  logic [TIME_W-1:0] max_thres,
  input  speed_e            speed,
  input  logic              speed_evt,  // speed is a new report
  output logic              c1,
  output logic              c2,
  output logic              c3,
  output logic              no_config
);
  ver_attr_t   cur;
  ver_attr_t   att [NVER];
  logic        slow, fast, wide, narrow, change;
  logic [2:0]  ok, pick;
  int unsigned best_d, best_r;
  int unsigned wdist [NVER];

  always_comb begin
    cur    = ver_attr(ver_id);
    slow   = time_evt && (time_i >= max_thres);
    fast   = time_evt && (time_i <= min_thres);
    wide   = speed_evt && (speed == SPEED_HIGH);
    narrow = speed_evt && (speed == SPEED_LOW);
    change = slow | fast | wide | narrow;
    for (int v = 0; v < NVER; v++) begin
      att[v]  = ver_attr(2'(v + 1));
      wdist[v] = (att[v].wcet > cur.wcet) ? 32'(att[v].wcet - cur.wcet)
                                         : 32'(cur.wcet - att[v].wcet);
      ok[v]   = (v + 1 != int'(ver_id))
              && (!slow   || (att[v].wcet < cur.wcet))
              && (!fast   || (att[v].wcet > cur.wcet))
              && (!wide   || (att[v].win  > cur.win))
              && (!narrow || (att[v].win  < cur.win));
    end
    pick      = '0;
    no_config = 1'b0;
    best_d    = 32'hFFFF_FFFF;
    best_r    = 32'hFFFF_FFFF;
    if (ver_id == 2'd0) begin
      // start: the version with the fewest resources
      for (int v = 0; v < NVER; v++)
        if (32'(att[v].res) < best_r) begin
          best_r = 32'(att[v].res);
          pick   = 3'b001 << v;
        end
    end else if (!change) begin
      pick = 3'b001 << (ver_id - 2'd1);
    end else begin
      for (int v = 0; v < NVER; v++)
        if (ok[v] && (wdist[v] < best_d ||
                      (wdist[v] == best_d && 32'(att[v].res) < best_r))) begin
          best_d = wdist[v];
          best_r = 32'(att[v].res);
          pick   = 3'b001 << v;
        end
      if (pick == 3'b000) begin
        no_config = 1'b1;
        pick      = 3'b001 << (ver_id - 2'd1);
      end
    end
  end

  assign {c3, c2, c1} = pick;
endmodule
