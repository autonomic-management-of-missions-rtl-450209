// Delayable task automaton.
//
// A task that is Idle, Waiting or Active. In Idle a request r starts the task
// at once when the controllable input c allows it (s = r and c, next state
// Active) or parks it in Wait otherwise; in Wait the start command s = c is
// issued as soon as c is true. An Active task returns to Idle when e (end)
// is true. Output a is true in Active. States, transitions and output
// equations are those of the delayable-task example; each rising clock edge
// is one reaction of the automaton and reset puts it in Idle (this design's
// choice).
//
// Timing: s is combinational in the current state and inputs; a and the
// state change one clock after the inputs that cause them.
module delayable (
  input  logic clk,
  input  logic rst_n,
  input  logic r,     // request to start
  input  logic c,     // controllable: start allowed
  input  logic e,     // end of the task
  output logic a,     // task active
  output logic s      // start command
);
  typedef enum logic [1:0] {IDLE = 2'd0, WAIT = 2'd1, ACTIVE = 2'd2} dstate_e;
  dstate_e state, state_nx;

  always_comb begin
    state_nx = state;
    a = 1'b0;
    s = 1'b0;
    unique case (state)
      IDLE: begin
        s = r & c;
        if (r & c)       state_nx = ACTIVE;
        else if (r & ~c) state_nx = WAIT;
      end
      WAIT: begin
        s = c;
        if (c) state_nx = ACTIVE;
      end
      ACTIVE: begin
        a = 1'b1;
        if (e) state_nx = IDLE;
      end
      default: state_nx = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= IDLE;
    else        state <= state_nx;
endmodule
