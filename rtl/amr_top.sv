// Autonomic reconfiguration control: reconfiguration and scheduling layers.
//
// The reconfiguration manager of the object-tracking task decides which
// version of the tracker runs (start/stop from the mission layer, version
// changes from the measured execution time, the good-performance interval
// and the target speed). Every change of version becomes a task list
// {task 1, version} (empty when stopped) for the scheduling table generator,
// which builds the table of the tracker DAG of that version into the next
// bank of the double-banked scheduling table and marks the running DAG for a
// switch. The scheduler runs the active table on NUM_TILES reconfigurable
// tiles: it requests bitstream loads on the ld_* port (the partial
// reconfiguration port is outside this design), starts nodes on the ex_*
// port (the tiles' processing functions are outside too) and reports the
// time of every DAG iteration, which closes the loop as the execution time
// seen by the reconfiguration manager.
//
// Beside this loop, the behavioural models used by the reconfiguration
// layer are instantiated with their signals brought out: one tile
// allocation automaton per tile (request = node start, end = node
// completion, always allocated for processing), a battery-level and a
// device-status automaton, a two-version task automaton and the two-task
// mutual-exclusion example.
//
// The layering, the tile count and the interfaces between the layers follow
// the described architecture; the mapping of tracker versions to DAGs and
// the use of the DAG iteration time as the manager's execution-time input
// are this design's choices.
module amr_top
  import amr_pkg::*;
#(
  parameter int NROWS     = 16,
  parameter int NUM_TILES = 6,
  parameter int TIME_W    = 16,
  localparam int IDX_W = $clog2(NROWS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // mission layer
  input  logic                  m_start,
  input  logic                  m_stop,
  input  logic                  m_thres_valid,
  input  logic [TIME_W-1:0]     m_min_thres,
  input  logic [TIME_W-1:0]     m_max_thres,
  input  logic                  m_speed_valid,
  input  speed_e                m_speed,
  output logic                  run,
  output logic [1:0]            ver_id,
  output logic [ATTR_W-1:0]     ver_res,
  output logic [ATTR_W-1:0]     ver_win,
  output logic [ATTR_W-1:0]     ver_wcet,
  output logic                  no_config,
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
  output tile_state_e           tile_state [NUM_TILES],
  // task metrics and table events
  output logic                  met_valid,
  output logic [TASK_W-1:0]     met_task,
  output logic [TIME_W-1:0]     met_time,
  output logic                  table_swap,
  output logic                  table_overflow,
  output logic                  gen_busy,
  output logic                  sched_loading,
  output logic                  sched_parking,
  // battery and device status models
  input  logic                  bat_up,
  input  logic                  bat_down,
  output bat_level_e            bat_level,
  input  logic                  dev_release,
  input  logic                  dev_acquire,
  output dev_state_e            dev_status,
  // two-version task model
  input  logic                  tm_r, tm_c1, tm_c2, tm_e,
  output logic [7:0]            tm_res,
  output logic [7:0]            tm_wcet,
  // two-task exclusion example
  input  logic                  x_r1, x_e1, x_r2, x_e2,
  output logic                  x_a1, x_s1, x_a2, x_s2
);
  localparam int LEN_W = $clog2(NROWS + 1);
  localparam logic [TASK_W-1:0] TRACK_ID = TASK_W'(1);

  // ---------------- reconfiguration layer ----------------
  logic              cmd_valid, rm_time_valid;

  assign rm_time_valid = met_valid && (met_task == TRACK_ID);

  reconfig_manager #(.TIME_W(TIME_W)) u_rm (
    .clk, .rst_n, .r(m_start), .e(m_stop),
    .time_valid(rm_time_valid), .time_i(met_time),
    .thres_valid(m_thres_valid), .min_thres_i(m_min_thres), .max_thres_i(m_max_thres),
    .speed_valid(m_speed_valid), .speed_i(m_speed),
    .run, .ver_id, .res(ver_res), .win(ver_win), .wcet(ver_wcet),
    .cmd_valid, .no_config, .step_o());

  // ---------------- scheduling layer ----------------
  logic [TASK_W-1:0] list_task [2];
  logic [1:0]        list_ver  [2];
  sched_row_t        rows [NROWS];
  logic [LEN_W-1:0]  len, commit_len;
  logic              next_valid, wr_en, commit, rb_en;
  logic [IDX_W-1:0]  wr_idx, rb_idx;
  sched_row_t        wr_row;
  row_id_t           rb_val;

  always_comb begin
    list_task[0] = run ? TRACK_ID : '0;
    list_ver[0]  = ver_id;
    list_task[1] = '0;
    list_ver[1]  = '0;
  end

  table_gen #(.NROWS(NROWS), .MAX_TASKS(2)) u_gen (
    .clk, .rst_n, .list_valid(cmd_valid), .list_task, .list_ver,
    .act_rows(rows), .act_len(len), .next_valid,
    .wr_en, .wr_idx, .wr_row, .commit, .commit_len,
    .rb_en, .rb_idx, .rb_val, .busy(gen_busy), .overflow(table_overflow));

  sched_table #(.NROWS(NROWS)) u_tbl (
    .clk, .rst_n, .wr_en, .wr_idx, .wr_row, .commit, .commit_len,
    .rb_en, .rb_idx, .rb_val, .swap(table_swap),
    .rows_o(rows), .len_o(len), .next_valid);

  scheduler #(.NROWS(NROWS), .NUM_TILES(NUM_TILES), .TIME_W(TIME_W)) u_sched (
    .clk, .rst_n, .rows, .len, .next_valid, .swap(table_swap),
    .ld_req, .ld_tile, .ld_file, .ld_done,
    .ex_start, .ex_row, .ex_file, .ex_done,
    .met_valid, .met_task, .met_time,
    .tile_busy(), .loading(sched_loading), .parking(sched_parking));

  // ---------------- behavioural models of the reconfiguration layer ----------------
  for (genvar t = 0; t < NUM_TILES; t++) begin : g_tile
    tile_model u_tile (.clk, .rst_n, .r(ex_start[t]), .c1(1'b1), .c2(1'b0),
                       .e(ex_done[t]), .state(tile_state[t]));
  end

  battery_model u_bat (.clk, .rst_n, .up(bat_up), .down(bat_down), .bat(bat_level));
  device_model  u_dev (.clk, .rst_n, .a(dev_release), .b(dev_acquire), .dev(dev_status));
  task_model    u_task (.clk, .rst_n, .r(tm_r), .c1(tm_c1), .c2(tm_c2), .e(tm_e),
                        .res(tm_res), .wcet(tm_wcet));
  twotasks      u_two (.clk, .rst_n, .r1(x_r1), .e1(x_e1), .r2(x_r2), .e2(x_e2),
                       .a1(x_a1), .s1(x_s1), .a2(x_a2), .s2(x_s2));
endmodule
