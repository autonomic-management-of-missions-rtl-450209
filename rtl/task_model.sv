// Two-version computation task automaton.
//
// A task that is Inactive or runs one of two versions (execution
// configurations). A request r starts Vers1 when c1 is true or Vers2 when c2
// is true; while active the task switches Vers1 -> Vers2 on (not c1 and c2)
// and Vers2 -> Vers1 on (not c2 and c1); e returns it to Inactive. Outputs
// res and wcet are the required resources and worst-case execution time of
// the running version, {0,0} when inactive. States and transitions follow
// the task model; the attribute values are parameters because no numbers are
// given for them, and e takes priority over a version switch (this design's
// choice). One reaction per rising clock edge; reset gives Inactive.
module task_model #(
  parameter int W = 8,
  parameter logic [W-1:0] RES1  = 8'd1,
  parameter logic [W-1:0] WCET1 = 8'd5,
  parameter logic [W-1:0] RES2  = 8'd2,
  parameter logic [W-1:0] WCET2 = 8'd3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         r,
  input  logic         c1,
  input  logic         c2,
  input  logic         e,
  output logic [W-1:0] res,
  output logic [W-1:0] wcet
);
  typedef enum logic [1:0] {INACTIVE = 2'd0, VERS1 = 2'd1, VERS2 = 2'd2} tstate_e;
  tstate_e state, state_nx;

  always_comb begin
    state_nx = state;
    res  = '0;
    wcet = '0;
    unique case (state)
      INACTIVE: begin
        if (r & c1)      state_nx = VERS1;
        else if (r & c2) state_nx = VERS2;
      end
      VERS1: begin
        res = RES1; wcet = WCET1;
        if (e)              state_nx = INACTIVE;
        else if (~c1 & c2)  state_nx = VERS2;
      end
      VERS2: begin
        res = RES2; wcet = WCET2;
        if (e)              state_nx = INACTIVE;
        else if (~c2 & c1)  state_nx = VERS1;
      end
      default: state_nx = INACTIVE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= INACTIVE;
    else        state <= state_nx;
endmodule
