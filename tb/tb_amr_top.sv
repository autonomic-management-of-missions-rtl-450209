// End-to-end testbench of amr_top at its default parameters.
//
// Models the parts outside the design: the bitstream-load port (LOAD_CYC
// cycles per bitstream) and the tiles, whose run time depends on the
// bitstream they hold (motion estimation, Harris, the v trackers of version
// v each doing 1/v of the tracking work, the localizer). The mission layer
// starts the tracker with a good-performance interval that version 1 cannot
// meet, so the manager climbs to versions 2 and 3; the interval is then
// moved so that the runs are too fast and it comes back down; a high speed
// report widens the window; finally the task is stopped.
//
// Checked against this testbench's own models: each node runs with its
// bitstream loaded; Harris after motion estimation, the trackers after
// Harris, the localizer after all trackers, motion estimation after the
// localizer; an iteration uses as many trackers as its version; metric
// times equal the measured iteration times; no tile is busy at a table
// switch; every version change follows a step whose time or speed calls for
// it; nothing runs after the stop. Each mechanism (start, version up,
// version down, table switch, parking, bitstream load, bitstream kept,
// parallel tracker start, no_config, speed change, stop, and the battery,
// device, task and exclusion models) is counted and must occur.
module tb_amr_top;
  import amr_pkg::*;
  localparam int NT = 6, LOAD_CYC = 30, WORK = 240;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic m_start, m_stop, m_thres_valid, m_speed_valid;
  logic [15:0] m_min_thres, m_max_thres;
  speed_e m_speed;
  logic run, no_config, ld_req, ld_done, met_valid, table_swap, table_overflow;
  logic gen_busy, sched_loading, sched_parking;
  logic [1:0] ver_id;
  logic [ATTR_W-1:0] ver_res, ver_win, ver_wcet;
  logic [TILE_W-1:0] ld_tile;
  logic [FILE_W-1:0] ld_file, ex_file;
  logic [NT-1:0] ex_start, ex_done;
  logic [3:0] ex_row;
  tile_state_e tile_state [NT];
  logic [TASK_W-1:0] met_task;
  logic [15:0] met_time;
  logic bat_up, bat_down, dev_release, dev_acquire, tm_r, tm_c1, tm_c2, tm_e;
  bat_level_e bat_level;
  dev_state_e dev_status;
  logic [7:0] tm_res, tm_wcet;
  logic x_r1, x_e1, x_r2, x_e2, x_a1, x_s1, x_a2, x_s2;

  amr_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  // mechanism counters
  int n_start = 0, n_up = 0, n_down = 0, n_swap = 0, n_park = 0, n_load = 0,
      n_kept = 0, n_parallel = 0, n_nocfg = 0, n_wide = 0, n_stop = 0, n_iter = 0;
  int n_bat = 0, n_dev = 0, n_tm = 0, n_excl = 0, n_tile_proc = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: start %0d up %0d down %0d iter %0d", n_start, n_up, n_down, n_iter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- tile and loader models ----------------
  function automatic int run_time(int file);
    case (file)
      1: return 20;                 // motion estimation
      2: return 20;                 // Harris
      3: return WORK;               // tracker, version 1 (one tracker)
      4: return WORK / 2;           // version 2: two trackers share the work
      5: return WORK / 3;           // version 3
      default: return 10;           // localizer
    endcase
  endfunction

  logic [FILE_W-1:0] t_file [NT];
  bit   t_cfg [NT], t_busy [NT], t_loaded_since [NT];
  int   t_cnt [NT], t_run_file [NT];
  int   ld_cnt = 0, ld_t = 0, ld_f = 0, cyc = 0;
  // node ordering state (per iteration)
  int   me_done = 0, harris_done = 0, trk_started = 0, trk_done = 0, loc_done = 0;
  int   me_start_cyc = 0, trk_ver = 0;
  bit   stopped = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    ld_done <= 1'b0;
    ex_done <= '0;
    if (rst_n) begin
      if (ld_req) begin
        check(ld_cnt == 0 && !t_busy[ld_tile], "load while loading or into a busy tile");
        ld_cnt = LOAD_CYC; ld_t = int'(ld_tile); ld_f = int'(ld_file);
        t_cfg[ld_tile] = 0; t_loaded_since[ld_tile] = 1;
        n_load++;
      end else if (ld_cnt > 0) begin
        ld_cnt--;
        if (ld_cnt == 0) begin
          ld_done <= 1'b1; t_cfg[ld_t] = 1; t_file[ld_t] = FILE_W'(ld_f);
        end
      end
      for (int t = 0; t < NT; t++) begin
        if (ex_start[t]) begin
          automatic int f = int'(ex_file);
          check(!stopped, "node started after the stop");
          check(!t_busy[t] && t_cfg[t] && int'(t_file[t]) == f, "tile not ready for this node");
          if (!t_loaded_since[t]) n_kept++;
          t_loaded_since[t] = 0;
          case (f)
            1: begin
                 check(loc_done == me_done, "motion estimation before the localizer ended");
                 me_start_cyc = cyc;
               end
            2: check(me_done == harris_done + 1, "Harris before motion estimation ended");
            3, 4, 5: begin
                 check(harris_done == me_done, "tracker before Harris ended");
                 if (trk_started == 0) trk_ver = f - 2;
                 check(f - 2 == trk_ver, "trackers of two versions in one iteration");
                 trk_started++;
                 if (trk_started == 2) n_parallel++;
               end
            default: begin
                 check(trk_done == trk_ver && trk_started == trk_ver,
                       $sformatf("localizer after %0d of %0d trackers", trk_done, trk_ver));
               end
          endcase
          t_busy[t] = 1; t_cnt[t] = run_time(f); t_run_file[t] = f;
        end else if (t_busy[t]) begin
          t_cnt[t]--;
          if (t_cnt[t] == 0) begin
            t_busy[t] = 0;
            ex_done[t] <= 1'b1;
            case (t_run_file[t])
              1: me_done++;
              2: harris_done++;
              3, 4, 5: trk_done++;
              default: begin loc_done++; trk_started = 0; trk_done = 0; end
            endcase
          end
        end
      end
      if (met_valid) begin
        automatic int meas = cyc - me_start_cyc;
        check(met_task == 1, "metric of an unknown task");
        check(int'(met_time) <= meas && int'(met_time) >= meas - 3,
              $sformatf("metric %0d, measured %0d", met_time, meas));
        n_iter++;
      end
      if (table_swap) begin
        n_swap++;
        for (int t = 0; t < NT; t++) check(!t_busy[t], "table switch with a busy tile");
      end
      for (int t = 0; t < NT; t++) if (tile_state[t] == TILE_PROCESSING) n_tile_proc++;
      if (no_config) n_nocfg++;
      if (x_a1 || x_a2) check(!(x_a1 && x_a2), "exclusion violated");
      if (x_s2 && x_a1) n_excl++;
    end
  end

  // parking: rising edges
  logic park_q = 0;
  always @(posedge clk) begin
    park_q <= sched_parking;
    if (rst_n && sched_parking && !park_q) n_park++;
  end

  // version changes must follow the objectives of the step that caused them
  logic [1:0] ver_q = 0;
  int last_time = 0;
  bit last_time_valid = 0, speed_high_pending = 0;
  always @(posedge clk) if (rst_n) begin
    ver_q <= ver_id;
    if (ver_id != ver_q) begin
      if (ver_q == 0) begin
        n_start++;
        check(ver_id == 1, "start with version 1");
      end else if (ver_id == 0) n_stop++;
      else if (ver_attr(ver_id).win > ver_attr(ver_q).win && speed_high_pending) begin
        n_wide++; speed_high_pending = 0;
      end else if (ver_attr(ver_id).wcet < ver_attr(ver_q).wcet) begin
        n_up++;
        check(last_time_valid && last_time >= int'(m_max_thres), "faster version without a slow run");
      end else begin
        n_down++;
        check(last_time_valid && last_time <= int'(m_min_thres), "slower version without a fast run");
      end
    end
    if (met_valid) begin last_time = int'(met_time); last_time_valid = 1; end
  end

  task automatic mission_thres(input int lo, input int hi);
    @(negedge clk);
    m_min_thres = 16'(lo); m_max_thres = 16'(hi); m_thres_valid = 1;
    @(negedge clk);
    m_thres_valid = 0;
  endtask

  task automatic wait_iters(input int n);
    int target;
    target = n_iter + n;
    while (n_iter < target) @(posedge clk);
  endtask

  int iters_v [4];
  always @(posedge clk) if (rst_n && met_valid) iters_v[trk_ver]++;

  initial begin
    m_start = 0; m_stop = 0; m_thres_valid = 0; m_speed_valid = 0;
    m_min_thres = 0; m_max_thres = 0; m_speed = SPEED_NORMAL;
    bat_up = 0; bat_down = 0; dev_release = 0; dev_acquire = 0;
    tm_r = 0; tm_c1 = 0; tm_c2 = 0; tm_e = 0; x_r1 = 0; x_e1 = 0; x_r2 = 0; x_e2 = 0;
    iters_v = '{0, 0, 0, 0};
    for (int t = 0; t < NT; t++) begin
      t_cfg[t] = 0; t_busy[t] = 0; t_cnt[t] = 0; t_file[t] = 0; t_loaded_since[t] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // interval that only version 3 meets
    mission_thres(150, 200);
    @(negedge clk); m_start = 1;
    @(negedge clk); m_start = 0;
    wait (ver_id == 3);
    wait_iters(4);
    check(ver_id == 3, "version 3 meets the interval and is kept");
    // interval too slow for version 3: come back down
    mission_thres(250, 400);
    wait (ver_id == 1);
    wait_iters(4);
    check(no_config || n_nocfg > 0, "no slower version than 1: no_config");
    // high speed: wider window (version 2), with an interval it meets
    mission_thres(100, 400);
    @(negedge clk); m_speed = SPEED_HIGH; m_speed_valid = 1;
    @(negedge clk); m_speed_valid = 0; speed_high_pending = 1;
    wait (ver_id == 2);
    wait_iters(3);
    check(ver_id == 2, "version 2 kept");
    // stop
    @(negedge clk); m_stop = 1;
    @(negedge clk); m_stop = 0;
    wait (table_swap);
    repeat (2) @(posedge clk);
    stopped = 1;
    repeat (500) @(posedge clk);
    check(!run && dut.len == 0, "stopped: empty table");

    // status models beside the loop
    @(negedge clk); bat_down = 1; @(negedge clk); bat_down = 0;
    check(bat_level == BAT_LOW, "battery low"); n_bat++;
    @(negedge clk); dev_acquire = 1; @(negedge clk); dev_acquire = 0;
    check(dev_status == DEV_BUSY, "device busy"); n_dev++;
    @(negedge clk); tm_r = 1; tm_c2 = 1; @(negedge clk); tm_r = 0;
    check(tm_wcet == 8'd3, "task model version 2"); n_tm++;
    @(negedge clk); x_r1 = 1; @(negedge clk); x_r1 = 0; x_r2 = 1;
    @(negedge clk); x_r2 = 0;
    check(x_a1 && !x_a2, "second task waits while the first is active");
    @(negedge clk); x_e1 = 1; #1 check(x_s2, "second task starts when the first ends");
    @(negedge clk); x_e1 = 0; n_excl++;

    $display("mechanisms: start %0d up %0d down %0d wide %0d stop %0d switch %0d park %0d load %0d kept %0d parallel %0d no_config %0d iterations %0d (v1 %0d v2 %0d v3 %0d)",
             n_start, n_up, n_down, n_wide, n_stop, n_swap, n_park, n_load, n_kept,
             n_parallel, n_nocfg, n_iter, iters_v[1], iters_v[2], iters_v[3]);
    check(n_start > 0, "start never happened");
    check(n_up >= 2, "switch to a faster version never happened twice");
    check(n_down >= 2, "switch to a slower version never happened twice");
    check(n_wide > 0, "window widening never happened");
    check(n_stop > 0, "stop never happened");
    check(n_swap >= 6, "too few table switches");
    check(n_park > 0, "DAG parking never happened");
    check(n_load > 0, "no bitstream load");
    check(n_kept > 0, "no bitstream kept across iterations");
    check(n_parallel > 0, "no parallel tracker start");
    check(n_nocfg > 0, "no_config never raised");
    check(n_tile_proc > 0, "tile models never in Processing");
    check(n_bat > 0 && n_dev > 0 && n_tm > 0 && n_excl > 0, "status models not exercised");
    check(!table_overflow, "table overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && met_valid && cyc < 100000)
    $display("iteration: version %0d time %0d", trk_ver, met_time);
endmodule
