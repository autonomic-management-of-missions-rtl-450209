// Testbench of the scheduler on the two-DAG example table.
//
// Table (11 rows) encodes two DAGs sharing tiles 0, 1 and 3:
//   task 1: node 0 -> {1, 2}; 1 -> 3 -> 5; 2 -> 4 -> 5
//   task 2: node 6 -> 7 -> 8 -> 9 -> 10 (and 6 -> 10)
// rows 0..10 hold nodes 0, 6, 1, 3, 2, 4, 7, 5, 8, 9, 10. Node 7 runs on
// tile 1. Tiles and the bitstream-load port are modelled here with fixed
// latencies. Checked independently of the scheduler's code:
//   * every node starts only after its parents (from the DAG edges above)
//     completed the same iteration, and a starting node only after the
//     previous iteration of its DAG ended;
//   * a tile runs one node at a time, with the bitstream loaded in it, and
//     the bitstream is the row's FileID;
//   * the nodes on tile 1 follow the order 1, 3, 7, 5, 9 (Load chain);
//   * tile 2 (Load = -1) is configured only once;
//   * metric times match the measured iteration times;
//   * after ReplaceBy marks task 2 stopped and task 1 moved to a new table,
//     the switch happens with no tile busy, task 2 never runs again and the
//     new table runs task 1.
module tb_scheduler;
  import amr_pkg::*;
  localparam int NROWS = 16, NT = 6, IDX_W = 4, LEN_W = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sched_row_t        rows [NROWS];
  logic [LEN_W-1:0]  len;
  logic              next_valid, swap;
  logic              ld_req, ld_done;
  logic [TILE_W-1:0] ld_tile;
  logic [FILE_W-1:0] ld_file;
  logic [NT-1:0]     ex_start, ex_done;
  logic [IDX_W-1:0]  ex_row;
  logic [FILE_W-1:0] ex_file;
  logic              met_valid;
  logic [TASK_W-1:0] met_task;
  logic [15:0]       met_time;

  scheduler #(.NROWS(NROWS), .NUM_TILES(NT)) dut (
    .clk, .rst_n, .rows, .len, .next_valid, .swap,
    .ld_req, .ld_tile, .ld_file, .ld_done,
    .ex_start, .ex_row, .ex_file, .ex_done,
    .met_valid, .met_task, .met_time,
    .tile_busy(), .loading(), .parking());

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  // ---- table rows: tile, file, next, load, activate, countdown, count, task, start
  function automatic sched_row_t mk(int tile, int file, int nx, int ld, int act,
                                    int cd, int cnt, int tid, int st);
    sched_row_t r;
    r = '{tile: TILE_W'(tile), file: FILE_W'(file), next: row_id_t'(nx),
          load: row_id_t'(ld), activate: row_id_t'(act), countdown: CNT_W'(cd),
          count: CNT_W'(cnt), task_id: TASK_W'(tid), replace_by: ROW_NONE,
          starting: st[0]};
    return r;
  endfunction

  sched_row_t tblA [NROWS], tblB [NROWS];
  int lenA = 11, lenB = 6;
  int node_of_row [11] = '{0, 6, 1, 3, 2, 4, 7, 5, 8, 9, 10};
  logic which;   // 0: tblA active, 1: tblB active

  initial begin
    for (int i = 0; i < NROWS; i++) begin tblA[i] = EMPTY_ROW; tblB[i] = EMPTY_ROW; end
    tblA[0]  = mk(3, 0, 2, 10, -1, 0, 1, 1, 1);
    tblA[1]  = mk(0, 6, 6, 4, -1, 0, 1, 2, 1);
    tblA[2]  = mk(1, 1, 3, 3, 4, 1, 1, 1, 0);
    tblA[3]  = mk(1, 3, 7, 6, -1, 1, 1, 1, 0);
    tblA[4]  = mk(0, 2, 5, 5, -1, 1, 1, 1, 0);
    tblA[5]  = mk(0, 4, 7, 1, -1, 1, 1, 1, 0);
    tblA[6]  = mk(1, 7, 8, 7, -1, 1, 1, 2, 0);
    tblA[7]  = mk(1, 5, 0, 9, -1, 2, 2, 1, 0);
    tblA[8]  = mk(2, 8, 9, -1, -1, 1, 1, 2, 0);
    tblA[9]  = mk(1, 9, 10, 2, -1, 1, 1, 2, 0);
    tblA[10] = mk(3, 10, 1, 0, -1, 1, 1, 2, 0);
    // next table: task 1 alone, rows hold nodes 0, 1, 3, 2, 4, 5
    tblB[0]  = mk(3, 0, 1, -1, -1, 0, 1, 1, 1);
    tblB[1]  = mk(1, 1, 2, 2, 3, 1, 1, 1, 0);
    tblB[2]  = mk(1, 3, 5, 5, -1, 1, 1, 1, 0);
    tblB[3]  = mk(0, 2, 4, 4, -1, 1, 1, 1, 0);
    tblB[4]  = mk(0, 4, 5, 3, -1, 1, 1, 1, 0);
    tblB[5]  = mk(1, 5, 0, 1, -1, 2, 2, 1, 0);
  end

  always_comb begin
    for (int i = 0; i < NROWS; i++) rows[i] = which ? tblB[i] : tblA[i];
    len = which ? LEN_W'(lenB) : LEN_W'(lenA);
  end

  // ---- reference DAGs (node numbers)
  function automatic bit is_parent(int p, int n);
    case (n)
      1, 2: return p == 0;
      3:    return p == 1;
      4:    return p == 2;
      5:    return p == 3 || p == 4;
      7:    return p == 6;
      8:    return p == 7;
      9:    return p == 8;
      10:   return p == 9 || p == 6;
      default: return 0;
    endcase
  endfunction

  int n_start [11], n_done [11];
  int node_row_b [6] = '{0, 1, 3, 2, 4, 5};

  // ---- tile and loader models
  logic [FILE_W-1:0] tile_file [NT];
  bit                tile_cfg  [NT];
  bit                tile_busy [NT];
  int                tile_node [NT];
  int                tile_cnt  [NT];
  int                loads_tile [NT];
  int                ld_cnt = 0;
  logic [TILE_W-1:0] ld_t;
  logic [FILE_W-1:0] ld_f;
  int                cyc = 0;
  int                t1_seq [$];
  int                iter_start [11];
  int                iters [3];
  int                met_seen = 0, swaps = 0, t2_after = 0, b_runs = 0;

  function automatic int dur(int node);
    return 3 + (node % 4);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    ld_done <= 1'b0;
    ex_done <= '0;
    if (rst_n) begin
      // loader: 7 cycles per bitstream
      if (ld_req) begin
        check(ld_cnt == 0, "load requested while another is in progress");
        check(!tile_busy[ld_tile], "reconfiguring a busy tile");
        ld_cnt = 7; ld_t = ld_tile; ld_f = ld_file;
        tile_cfg[ld_tile] = 0;
        loads_tile[ld_tile]++;
      end else if (ld_cnt > 0) begin
        ld_cnt--;
        if (ld_cnt == 0) begin
          ld_done <= 1'b1;
          tile_cfg[ld_t] = 1; tile_file[ld_t] = ld_f;
        end
      end
      // tiles
      for (int t = 0; t < NT; t++) begin
        if (ex_start[t]) begin
          automatic int n;
          n = which ? node_row_b[ex_row] : node_of_row[ex_row];
          check(!tile_busy[t], "tile started while busy");
          check(tile_cfg[t] && tile_file[t] == ex_file, "tile runs a bitstream it does not hold");
          check(ex_file == rows[ex_row].file && int'(rows[ex_row].tile) == t,
                "start does not match the row's tile/file");
          for (int p = 0; p < 11; p++)
            if (is_parent(p, n))
              check(n_done[p] >= n_start[n] + 1, $sformatf("node %0d started before parent %0d", n, p));
          if (n == 0) check(n_done[5] >= n_start[0], "task 1 restarted before its iteration ended");
          if (n == 6) check(n_done[10] >= n_start[6], "task 2 restarted before its iteration ended");
          if (n == 0 || n == 6) iter_start[n] = cyc;
          if (swaps > 0 && n >= 6) t2_after++;
          if (which) b_runs++;
          if (t == 1 && !which) t1_seq.push_back(n);
          n_start[n]++;
          tile_busy[t] = 1; tile_node[t] = n; tile_cnt[t] = dur(n);
        end else if (tile_busy[t]) begin
          tile_cnt[t]--;
          if (tile_cnt[t] == 0) begin
            tile_busy[t] = 0;
            n_done[tile_node[t]]++;
            ex_done[t] <= 1'b1;
          end
        end
      end
      if (met_valid) begin
        automatic int sn = (met_task == 1) ? 0 : 6;
        automatic int ref_t = cyc - iter_start[sn];
        met_seen++;
        check(met_task == 1 || met_task == 2, "metric with an unknown task");
        check(int'(met_time) >= ref_t - 3 && int'(met_time) <= ref_t,
              $sformatf("metric time %0d, measured %0d", met_time, ref_t));
        if (met_task <= 2) iters[met_task]++;
      end
      if (swap) begin
        swaps++;
        for (int t = 0; t < NT; t++) check(!tile_busy[t], "table switched with a busy tile");
      end
    end
  end

  // table bank model: swap takes effect at the next edge
  always @(posedge clk) if (rst_n && swap) begin which <= 1'b1; next_valid <= 1'b0; end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: iterations %0d/%0d, switches %0d, starts %p", iters[1], iters[2], swaps, n_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    which = 0; next_valid = 0;
    for (int t = 0; t < NT; t++) begin
      tile_cfg[t] = 0; tile_busy[t] = 0; tile_file[t] = 0; loads_tile[t] = 0; tile_cnt[t] = 0;
    end
    for (int n = 0; n < 11; n++) begin n_start[n] = 0; n_done[n] = 0; iter_start[n] = 0; end
    iters = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (iters[1] >= 3 && iters[2] >= 3);
    check(loads_tile[2] == 1, $sformatf("tile 2 configured %0d times, expected once", loads_tile[2]));
    check(loads_tile[3] >= 5, "tile 3 should alternate between nodes 0 and 10");
    // tile 1 order 1, 3, 7, 5, 9 repeated
    for (int k = 0; k < 10; k++) begin
      automatic int exp_seq [5] = '{1, 3, 7, 5, 9};
      check(t1_seq[k] == exp_seq[k % 5], $sformatf("tile 1 order: got node %0d at %0d", t1_seq[k], k));
    end
    // request the switch: task 2 stops, task 1 moves to row 0 of the next table
    @(negedge clk);
    next_valid = 1;
    tblA[0].replace_by = 0;
    tblA[1].replace_by = ROW_STOP;
    wait (swaps == 1);
    begin
      automatic int i1 = iters[1];
      wait (iters[1] >= i1 + 3);
    end
    check(t2_after == 0, "task 2 ran after the switch");
    check(b_runs >= 18, "new table did not run task 1");
    check(met_seen > 0, "no metrics");
    repeat (20) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
