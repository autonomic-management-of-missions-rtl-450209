// Scheduler of the scheduling layer: runs the DAGs encoded in the active
// scheduling table on the shared reconfigurable tiles.
//
// How it works. Each tile has an owner row: after a table becomes active,
// the owner of a tile is the lowest row mapped to it; when a node completes,
// its tile passes to the row named in its Load column (-1: the tile keeps
// its bitstream until the next table). A tile whose owner's bitstream
// (FileID) is not the one configured is reconfigured through the single
// bitstream-load port; a tile that already holds the right bitstream is not
// reloaded. A node is started when its tile is owned by it, configured with
// its bitstream and idle, and its working Countdown is 0. Starting a node
// reloads its Countdown from Count and decrements the Countdown of the row in
// its Activate column (parallel sons). Completing a node decrements the
// Countdown of its Next row; when that row is a starting node, one iteration
// of the DAG has ended and a metric (task ID, cycles since the DAG's
// starting node was started) is emitted. DAGs repeat until a switch.
//
// Table switch. A starting node whose ReplaceBy is not -1 is not started
// again once its Countdown reaches 0: the DAG is parked at its boundary
// (-2 stops it; a row number hands it to the next table). When every DAG of
// the active table is parked, no tile is busy, no load is in progress and a
// next table is valid, swap is pulsed and the next table takes over, so no
// node is interrupted. An empty active table switches at once.
//
// Sequencing: one row is examined per cycle (round robin over NROWS), and a
// cycle that retires a completion does not scan. Completions (ex_done, one
// pulse per tile) and load completions (ld_done) may arrive at any time.
// ld_req, ex_start and met_valid are one-cycle pulses.
//
// The column semantics follow the scheduling-table description; the tile
// ownership at table start, the prefetching of bitstreams, the round-robin
// scan and the switch rule are this design's choices.
module scheduler
  import amr_pkg::*;
#(
  parameter int NROWS     = 16,
  parameter int NUM_TILES = 6,
  parameter int TIME_W    = 16,
  localparam int IDX_W = $clog2(NROWS),
  localparam int LEN_W = $clog2(NROWS + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // active table
  input  sched_row_t            rows [NROWS],
  input  logic [LEN_W-1:0]      len,
  input  logic                  next_valid,
  output logic                  swap,
  // bitstream load port
  output logic                  ld_req,
  output logic [TILE_W-1:0]     ld_tile,
  output logic [FILE_W-1:0]     ld_file,
  input  logic                  ld_done,
  // tiles
  output logic [NUM_TILES-1:0]  ex_start,
  output logic [IDX_W-1:0]      ex_row,
  output logic [FILE_W-1:0]     ex_file,
  input  logic [NUM_TILES-1:0]  ex_done,
  // metrics / end of sequence
  output logic                  met_valid,
  output logic [TASK_W-1:0]     met_task,
  output logic [TIME_W-1:0]     met_time,
  // status
  output logic [NUM_TILES-1:0]  tile_busy,
  output logic                  loading,
  output logic                  parking    // some DAG is parked for a switch
);
  typedef enum logic [1:0] {S_INIT, S_RUN, S_SWAP} sstate_e;
  sstate_e st;

  logic [CNT_W-1:0]     cd       [NROWS];
  logic [NROWS-1:0]     parked;
  logic [TIME_W-1:0]    t_start  [NROWS];
  logic [TIME_W-1:0]    now;
  row_id_t              owner    [NUM_TILES];
  logic [FILE_W-1:0]    cfg_file [NUM_TILES];
  logic [NUM_TILES-1:0] cfg_ok;
  logic [IDX_W-1:0]     exec_row [NUM_TILES];
  logic [NUM_TILES-1:0] busy, done_pend;
  logic [TILE_W-1:0]    ld_tile_q;
  logic [FILE_W-1:0]    ld_file_q;
  logic                 ld_busy;
  logic [IDX_W-1:0]     ptr;

  // -------- combinational decisions --------
  logic                 any_done, all_parked;
  int unsigned          dt;           // tile whose completion is retired
  sched_row_t           pr;           // row under the scan pointer
  logic                 in_tbl, own, cfg_match, can_park, can_start, can_load;
  int unsigned          pt;
  row_id_t              first_row [NUM_TILES];

  always_comb begin
    any_done = |done_pend;
    dt = 0;
    for (int t = NUM_TILES-1; t >= 0; t--) if (done_pend[t]) dt = t;

    all_parked = 1'b1;
    for (int i = 0; i < NROWS; i++)
      if (i < int'(len) && rows[i].starting && !parked[i]) all_parked = 1'b0;

    pr        = rows[ptr];
    pt        = int'(pr.tile);
    in_tbl    = (int'(ptr) < int'(len)) && (pt < NUM_TILES);
    own       = in_tbl && (owner[pt] == row_id_t'(ptr));
    cfg_match = cfg_ok[pt] && (cfg_file[pt] == pr.file) &&
                !(ld_busy && int'(ld_tile_q) == pt);
    can_park  = in_tbl && pr.starting && !parked[ptr] && (cd[ptr] == '0) &&
                (pr.replace_by != ROW_NONE);
    can_start = own && !can_park && !parked[ptr] && (cd[ptr] == '0) &&
                cfg_match && !busy[pt];
    can_load  = own && !cfg_match && !busy[pt] && !ld_busy;

    for (int t = 0; t < NUM_TILES; t++) begin
      first_row[t] = ROW_NONE;
      for (int i = NROWS-1; i >= 0; i--)
        if (i < int'(len) && int'(rows[i].tile) == t) first_row[t] = row_id_t'(i);
    end
  end

  assign tile_busy = busy;
  assign loading   = ld_busy;
  assign parking   = |parked;

  // -------- sequential --------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st        <= S_INIT;
      now       <= '0;
      ptr       <= '0;
      parked    <= '0;
      busy      <= '0;
      done_pend <= '0;
      cfg_ok    <= '0;
      ld_busy   <= 1'b0;
      ld_tile_q <= '0;
      ld_file_q <= '0;
      swap      <= 1'b0;
      ld_req    <= 1'b0;
      ld_tile   <= '0;
      ld_file   <= '0;
      ex_start  <= '0;
      ex_row    <= '0;
      ex_file   <= '0;
      met_valid <= 1'b0;
      met_task  <= '0;
      met_time  <= '0;
      for (int i = 0; i < NROWS; i++) begin
        cd[i]      <= '0;
        t_start[i] <= '0;
      end
      for (int t = 0; t < NUM_TILES; t++) begin
        owner[t]    <= ROW_NONE;
        cfg_file[t] <= '0;
        exec_row[t] <= '0;
      end
    end else begin
      now       <= now + 1'b1;
      swap      <= 1'b0;
      ld_req    <= 1'b0;
      ex_start  <= '0;
      met_valid <= 1'b0;
      done_pend <= done_pend | ex_done;

      if (ld_done && ld_busy) begin
        ld_busy                 <= 1'b0;
        cfg_ok[ld_tile_q]       <= 1'b1;
        cfg_file[ld_tile_q]     <= ld_file_q;
      end

      unique case (st)
        S_INIT: begin
          // take over the (new) active table
          for (int i = 0; i < NROWS; i++) cd[i] <= rows[i].countdown;
          for (int t = 0; t < NUM_TILES; t++) owner[t] <= first_row[t];
          parked <= '0;
          ptr    <= '0;
          st     <= S_RUN;
        end

        S_RUN: begin
          if (any_done) begin
            // retire one completion
            automatic sched_row_t dr = rows[exec_row[dt]];
            busy[dt]      <= 1'b0;
            done_pend[dt] <= ex_done[dt];
            if (dr.next != ROW_NONE && int'(dr.next) >= 0) begin
              automatic int unsigned nx = int'(dr.next);
              if (cd[nx] != '0) cd[nx] <= cd[nx] - 1'b1;
              if (rows[nx].starting) begin
                met_valid <= 1'b1;
                met_task  <= rows[nx].task_id;
                met_time  <= now - t_start[nx];
              end
            end
            if (dr.load != ROW_NONE && int'(dr.load) >= 0)
              owner[dt] <= dr.load;
          end else if (all_parked && next_valid && busy == '0 && !ld_busy) begin
            swap <= 1'b1;
            st   <= S_SWAP;
          end else begin
            if (can_park)
              parked[ptr] <= 1'b1;
            else if (can_start) begin
              ex_start[pt]  <= 1'b1;
              ex_row        <= ptr;
              ex_file       <= pr.file;
              busy[pt]      <= 1'b1;
              exec_row[pt]  <= ptr;
              cd[ptr]       <= pr.count;
              if (pr.starting) t_start[ptr] <= now;
              if (pr.activate != ROW_NONE && int'(pr.activate) >= 0)
                if (cd[int'(pr.activate)] != '0)
                  cd[int'(pr.activate)] <= cd[int'(pr.activate)] - 1'b1;
            end else if (can_load) begin
              ld_req     <= 1'b1;
              ld_tile    <= pr.tile;
              ld_file    <= pr.file;
              ld_busy    <= 1'b1;
              ld_tile_q  <= pr.tile;
              ld_file_q  <= pr.file;
              cfg_ok[pt] <= 1'b0;
            end
            ptr <= (int'(ptr) == NROWS-1) ? '0 : ptr + 1'b1;
          end
        end

        default: st <= S_INIT;   // S_SWAP: the table bank changes this edge
      endcase
    end

  a_done_busy: assert property (@(posedge clk) disable iff (!rst_n)
      (ex_done & ~busy) == '0)
    else $error("completion from a tile that was not started");
  a_ld_done: assert property (@(posedge clk) disable iff (!rst_n) ld_done |-> ld_busy)
    else $error("load completion without a load");
endmodule
