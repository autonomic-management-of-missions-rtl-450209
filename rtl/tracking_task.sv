// Tracking task automaton with three versions.
//
// States OFF, Version 1, Version 2 and Version 3. A request r starts the
// version whose controllable input (c1, c2, c3) is true; e returns any
// running version to OFF; a running version Vi switches to Vj when cj is
// true and ci is false. Outputs: run (task running), ver_id (0 when OFF),
// and the attributes {res, win, wcet} of the running version, {0,0,0} when
// OFF: V1 = {1,1,5}, V2 = {2,2,4}, V3 = {3,1,3}. States, transitions and
// attribute values follow the tracking-task model. This design's choices:
// the automaton reacts only on clock edges where step is high (the
// manager's integration logic decides when a step is due); e has priority
// over a switch; when several controllables are true the lowest-numbered
// version wins from OFF and the adjacent version wins when running.
//
// Timing: outputs are registered state (ver_id) and combinational decode of
// it; a step at edge k shows its result after edge k.
module tracking_task
  import amr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step,
  input  logic              r,
  input  logic              c1,
  input  logic              c2,
  input  logic              c3,
  input  logic              e,
  output logic              run,
  output logic [1:0]        ver_id,
  output logic [ATTR_W-1:0] res,
  output logic [ATTR_W-1:0] win,
  output logic [ATTR_W-1:0] wcet
);
  logic [1:0] ver_nx;

  always_comb begin
    ver_nx = ver_id;
    unique case (ver_id)
      2'd0: begin
        if (r & c1)      ver_nx = 2'd1;
        else if (r & c2) ver_nx = 2'd2;
        else if (r & c3) ver_nx = 2'd3;
      end
      2'd1: begin
        if (e)              ver_nx = 2'd0;
        else if (~c1 & c2)  ver_nx = 2'd2;
        else if (~c1 & c3)  ver_nx = 2'd3;
      end
      2'd2: begin
        if (e)              ver_nx = 2'd0;
        else if (~c2 & c1)  ver_nx = 2'd1;
        else if (~c2 & c3)  ver_nx = 2'd3;
      end
      default: begin
        if (e)              ver_nx = 2'd0;
        else if (~c3 & c2)  ver_nx = 2'd2;
        else if (~c3 & c1)  ver_nx = 2'd1;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    ver_id <= 2'd0;
    else if (step) ver_id <= ver_nx;

  ver_attr_t attr;
  always_comb begin
    attr = ver_attr(ver_id);
    run  = (ver_id != 2'd0);
    res  = attr.res;
    win  = attr.win;
    wcet = attr.wcet;
  end
endmodule
