// Scheduling table generator.
//
// Turns the list of task versions to run, received from the reconfiguration
// layer, into a scheduling table and hands it to the scheduler without
// interrupting running DAGs. Each list entry is a task ID (0 = empty slot)
// and the version of that task; the DAG of each version comes from the
// library function dag_node() of amr_pkg. The DAGs are laid out one after
// the other in list order, their Next/Activate references relocated to their
// row positions. The Load column is then computed per tile: each row's Load
// is the next row, in row order and wrapping around, that uses the same
// tile, or -1 if the row is alone on its tile. The table is written into the
// scheduling table's next bank row by row and committed with its length.
// Finally the ReplaceBy column of every starting row of the active table is
// set: the starting row of the same task in the new table, or -2 when the
// task is not in the new list.
//
// Timing: list_valid latches a list (a later list replaces one still
// waiting). Generation starts when the previous next table has been taken
// (next_valid low) and takes 1 + NROWS + 1 + NROWS cycles; busy is high from
// the cycle after list_valid until the last ReplaceBy write.
// overflow is raised when the DAGs do not fit in NROWS rows; the
// tasks that do not fit are dropped.
//
// Generating the table on line from the task list and the ReplaceBy update
// follow the document; the library, the row layout and the Load rule are
// this design's own.
module table_gen
  import amr_pkg::*;
#(
  parameter int NROWS     = 16,
  parameter int MAX_TASKS = 2,
  localparam int IDX_W = $clog2(NROWS),
  localparam int LEN_W = $clog2(NROWS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              list_valid,
  input  logic [TASK_W-1:0] list_task [MAX_TASKS],
  input  logic [1:0]        list_ver  [MAX_TASKS],
  // active table (for ReplaceBy)
  input  sched_row_t        act_rows [NROWS],
  input  logic [LEN_W-1:0]  act_len,
  input  logic              next_valid,
  // writes to the scheduling table
  output logic              wr_en,
  output logic [IDX_W-1:0]  wr_idx,
  output sched_row_t        wr_row,
  output logic              commit,
  output logic [LEN_W-1:0]  commit_len,
  output logic              rb_en,
  output logic [IDX_W-1:0]  rb_idx,
  output row_id_t           rb_val,
  output logic              busy,
  output logic              overflow
);
  typedef enum logic [2:0] {G_IDLE, G_BUILD, G_WRITE, G_COMMIT, G_REPLACE} gstate_e;
  gstate_e st;

  logic              pend;
  logic [TASK_W-1:0] ltask [MAX_TASKS];
  logic [1:0]        lver  [MAX_TASKS];
  sched_row_t        tbl   [NROWS];
  logic [LEN_W-1:0]  tlen;
  logic [IDX_W-1:0]  idx;

  // ---- combinational table construction ----
  sched_row_t        raw  [NROWS];
  sched_row_t        nt   [NROWS];
  int unsigned       n_rows;
  logic              ovf;

  always_comb begin
    int unsigned base, sz, j;
    j = 0;
    for (int i = 0; i < NROWS; i++) raw[i] = EMPTY_ROW;
    base = 0;
    ovf  = 1'b0;
    for (int k = 0; k < MAX_TASKS; k++) begin
      sz = (ltask[k] != '0) ? dag_size(lver[k]) : 0;
      if (base + sz > NROWS) begin
        if (sz != 0) ovf = 1'b1;
      end else begin
        for (int n = 0; n < NROWS; n++)
          if (n < int'(sz)) raw[base + n] = dag_node(lver[k], n, ltask[k], int'(base));
        base = base + sz;
      end
    end
    n_rows = base;
    // Load chains: next row on the same tile, cyclic
    for (int i = 0; i < NROWS; i++) begin
      nt[i] = raw[i];
      nt[i].load = ROW_NONE;
      if (i < int'(n_rows)) begin
        for (int d = NROWS-1; d >= 1; d--) begin
          j = (i + d) % n_rows;
          if (d < int'(n_rows) && raw[j].tile == raw[i].tile && j != i)
            nt[i].load = row_id_t'(j);
        end
      end
    end
  end

  // starting row of a task in the new table, -2 if absent
  function automatic row_id_t new_start(input logic [TASK_W-1:0] tid);
    row_id_t r;
    r = ROW_STOP;
    for (int i = NROWS-1; i >= 0; i--)
      if (i < int'(tlen) && tbl[i].starting && tbl[i].task_id == tid) r = row_id_t'(i);
    return r;
  endfunction

  assign busy = (st != G_IDLE) || pend;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st         <= G_IDLE;
      pend       <= 1'b0;
      tlen       <= '0;
      idx        <= '0;
      wr_en      <= 1'b0;
      wr_idx     <= '0;
      wr_row     <= EMPTY_ROW;
      commit     <= 1'b0;
      commit_len <= '0;
      rb_en      <= 1'b0;
      rb_idx     <= '0;
      rb_val     <= ROW_NONE;
      overflow   <= 1'b0;
      for (int k = 0; k < MAX_TASKS; k++) begin
        ltask[k] <= '0;
        lver[k]  <= '0;
      end
      for (int i = 0; i < NROWS; i++) tbl[i] <= EMPTY_ROW;
    end else begin
      wr_en  <= 1'b0;
      commit <= 1'b0;
      rb_en  <= 1'b0;
      if (list_valid && (st == G_IDLE || st == G_BUILD)) begin
        ltask <= list_task;
        lver  <= list_ver;
        pend  <= 1'b1;
      end
      unique case (st)
        G_IDLE:
          if (pend && !list_valid && !next_valid) st <= G_BUILD;
        G_BUILD: begin
          tbl      <= nt;
          tlen     <= LEN_W'(n_rows);
          overflow <= ovf;
          pend     <= list_valid;
          idx      <= '0;
          st       <= list_valid ? G_BUILD : G_WRITE;
        end
        G_WRITE: begin
          wr_en  <= 1'b1;
          wr_idx <= idx;
          wr_row <= tbl[idx];
          idx    <= idx + 1'b1;
          if (int'(idx) == NROWS-1) st <= G_COMMIT;
        end
        G_COMMIT: begin
          commit     <= 1'b1;
          commit_len <= tlen;
          idx        <= '0;
          st         <= G_REPLACE;
        end
        default: begin   // G_REPLACE
          if (int'(idx) < int'(act_len) && act_rows[idx].starting) begin
            rb_en  <= 1'b1;
            rb_idx <= idx;
            rb_val <= new_start(act_rows[idx].task_id);
          end
          idx <= idx + 1'b1;
          if (int'(idx) == NROWS-1) st <= G_IDLE;
        end
      endcase
    end
endmodule
