// Testbench of the scheduling table generator.
//
// The generator's writes are captured into a model of the next bank and
// compared with tables worked out by hand from the tracker DAGs (version v:
// motion estimation on tile 0 -> Harris on tile 1 -> v trackers on tiles
// 2.. started together -> localizer on tile 0, which waits for the v
// trackers and loops back to motion estimation; bitstreams 1, 2, 2+v, 6).
// Load chains link the rows sharing a tile in row order. Also checked:
// ReplaceBy of the active table's starting rows (new starting row of the
// same task, -2 for a task that disappears), no generation while the
// previous next table is still pending, and the overflow flag of a small
// instance that cannot hold two large DAGs.
module tb_table_gen;
  import amr_pkg::*;
  localparam int NROWS = 16;
  logic clk = 0, rst_n = 0;
  logic list_valid, next_valid;
  logic [TASK_W-1:0] list_task [2];
  logic [1:0] list_ver [2];
  sched_row_t act_rows [NROWS];
  logic [4:0] act_len, commit_len;
  logic wr_en, commit, rb_en, busy, overflow;
  logic [3:0] wr_idx, rb_idx;
  sched_row_t wr_row;
  row_id_t rb_val;
  always #5 clk = ~clk;
  table_gen dut (.*);

  // small instance for the overflow case
  logic list_valid8;
  sched_row_t act8 [8];
  logic [3:0] commit_len8;
  logic wr_en8, commit8, rb_en8, busy8, overflow8;
  logic [2:0] wr_idx8, rb_idx8;
  sched_row_t wr_row8;
  row_id_t rb_val8;
  table_gen #(.NROWS(8)) dut8 (
    .clk, .rst_n, .list_valid(list_valid8), .list_task, .list_ver,
    .act_rows(act8), .act_len(4'd0), .next_valid(1'b0),
    .wr_en(wr_en8), .wr_idx(wr_idx8), .wr_row(wr_row8), .commit(commit8),
    .commit_len(commit_len8), .rb_en(rb_en8), .rb_idx(rb_idx8), .rb_val(rb_val8),
    .busy(busy8), .overflow(overflow8));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sched_row_t got [NROWS];
  int got_len, commits, writes_while_pending;
  row_id_t rb [NROWS];
  always @(posedge clk) if (rst_n) begin
    if (wr_en) got[wr_idx] <= wr_row;
    if (wr_en && next_valid) writes_while_pending++;
    if (commit) begin got_len <= int'(commit_len); commits++; end
    if (rb_en) rb[rb_idx] <= rb_val;
  end

  function automatic sched_row_t mk(int tile, int file, int nx, int ld, int act,
                                    int cd, int cnt, int tid, int st);
    sched_row_t r;
    r = '{tile: TILE_W'(tile), file: FILE_W'(file), next: row_id_t'(nx),
          load: row_id_t'(ld), activate: row_id_t'(act), countdown: CNT_W'(cd),
          count: CNT_W'(cnt), task_id: TASK_W'(tid), replace_by: ROW_NONE,
          starting: st[0]};
    return r;
  endfunction

  sched_row_t exp_t [NROWS];

  task automatic run_list(input int t0, v0, t1, v1);
    list_task[0] = TASK_W'(t0); list_ver[0] = 2'(v0);
    list_task[1] = TASK_W'(t1); list_ver[1] = 2'(v1);
    @(negedge clk); list_valid = 1;
    @(negedge clk); list_valid = 0;
    wait (!busy);
    @(negedge clk);
  endtask

  task automatic compare(input int n, input string msg);
    check(got_len == n, $sformatf("%s: length %0d expected %0d", msg, got_len, n));
    for (int i = 0; i < NROWS; i++)
      check(got[i] == (i < n ? exp_t[i] : EMPTY_ROW), $sformatf("%s: row %0d", msg, i));
  endtask

  initial begin
    list_valid = 0; list_valid8 = 0; next_valid = 0; act_len = 0;
    commits = 0; writes_while_pending = 0;
    for (int i = 0; i < NROWS; i++) begin act_rows[i] = EMPTY_ROW; rb[i] = ROW_NONE; end
    for (int i = 0; i < 8; i++) act8[i] = EMPTY_ROW;
    for (int i = 0; i < NROWS; i++) exp_t[i] = EMPTY_ROW;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- task 1, version 2, with an active table running tasks 1 and 3
    act_len = 9;
    act_rows[0] = mk(0, 1, 1, -1, -1, 0, 1, 1, 1);
    act_rows[5] = mk(0, 1, 6, -1, -1, 0, 1, 3, 1);
    run_list(1, 2, 0, 0);
    exp_t[0] = mk(0, 1, 1, 4, -1, 0, 1, 1, 1);
    exp_t[1] = mk(1, 2, 2, -1, -1, 1, 1, 1, 0);
    exp_t[2] = mk(2, 4, 4, -1, 3, 1, 1, 1, 0);
    exp_t[3] = mk(3, 4, 4, -1, -1, 1, 1, 1, 0);
    exp_t[4] = mk(0, 6, 0, 0, -1, 2, 2, 1, 0);
    compare(5, "task 1 version 2");
    check(rb[0] == 0, "ReplaceBy of task 1 -> row 0");
    check(rb[5] == ROW_STOP, "ReplaceBy of task 3 -> stop (-2)");
    check(rb[1] == ROW_NONE, "non-starting rows untouched");
    check(commits == 1 && !overflow, "one commit, no overflow");

    // ---- pending next table: nothing is generated until it is taken
    next_valid = 1;
    act_len = 0;
    list_task[0] = 2; list_ver[0] = 1; list_task[1] = 5; list_ver[1] = 3;
    @(negedge clk); list_valid = 1;
    @(negedge clk); list_valid = 0;
    repeat (60) @(negedge clk);
    check(commits == 1 && writes_while_pending == 0, "waited for the pending table");
    next_valid = 0;
    @(negedge clk);
    wait (!busy);
    @(negedge clk);
    // task 2 version 1 (rows 0..3), task 5 version 3 (rows 4..9)
    for (int i = 0; i < NROWS; i++) exp_t[i] = EMPTY_ROW;
    exp_t[0] = mk(0, 1, 1, 3, -1, 0, 1, 2, 1);
    exp_t[1] = mk(1, 2, 2, 5, -1, 1, 1, 2, 0);
    exp_t[2] = mk(2, 3, 3, 6, -1, 1, 1, 2, 0);
    exp_t[3] = mk(0, 6, 0, 4, -1, 1, 1, 2, 0);
    exp_t[4] = mk(0, 1, 5, 9, -1, 0, 1, 5, 1);
    exp_t[5] = mk(1, 2, 6, 1, -1, 1, 1, 5, 0);
    exp_t[6] = mk(2, 5, 9, 2, 7, 1, 1, 5, 0);
    exp_t[7] = mk(3, 5, 9, -1, 8, 1, 1, 5, 0);
    exp_t[8] = mk(4, 5, 9, -1, -1, 1, 1, 5, 0);
    exp_t[9] = mk(0, 6, 4, 0, -1, 3, 3, 5, 0);
    compare(10, "tasks 2 and 5");
    check(commits == 2, "second commit");

    // ---- empty list: empty table
    run_list(0, 0, 0, 0);
    for (int i = 0; i < NROWS; i++) exp_t[i] = EMPTY_ROW;
    compare(0, "empty list");

    // ---- overflow in an 8-row table: the second DAG does not fit
    list_task[0] = 1; list_ver[0] = 3; list_task[1] = 2; list_ver[1] = 3;
    @(negedge clk); list_valid8 = 1;
    @(negedge clk); list_valid8 = 0;
    wait (!busy8);
    @(negedge clk);
    check(overflow8, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
