// Reconfigurable tile allocation automaton.
//
// Models the allocation of one reconfigurable tile: OFF, Processing (the
// tile computes) or Storage (the tile is used as memory). From OFF a request
// r allocates it for processing when c1 is true or as storage when c2 is
// true. An allocated tile returns to OFF on e when no new request is
// present, and switches role on e together with r and the other
// controllable (e & r & c2 to Storage, e & r & c1 to Processing). States,
// transitions and the output follow the tile model; where both c1 and c2 are
// true in OFF this design gives Processing priority, and reset returns the
// tile to OFF. Each rising clock edge is one reaction; state is the current
// state.
module tile_model
  import amr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        r,
  input  logic        c1,
  input  logic        c2,
  input  logic        e,
  output tile_state_e state
);
  tile_state_e state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      TILE_OFF: begin
        if (r & c1)      state_nx = TILE_PROCESSING;
        else if (r & c2) state_nx = TILE_STORAGE;
      end
      TILE_PROCESSING: begin
        if (e & ~r)           state_nx = TILE_OFF;
        else if (e & r & c2)  state_nx = TILE_STORAGE;
      end
      TILE_STORAGE: begin
        if (e & ~r)           state_nx = TILE_OFF;
        else if (e & r & c1)  state_nx = TILE_PROCESSING;
      end
      default: state_nx = TILE_OFF;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= TILE_OFF;
    else        state <= state_nx;
endmodule
