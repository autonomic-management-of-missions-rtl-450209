// Testbench of the tracking-task control logic.
//
// Directed cases from the objectives (slow run -> smaller wcet, fast run ->
// larger wcet, high speed -> larger window, low speed -> smaller window,
// start -> fewest resources, one version at a time), then an exhaustive
// sweep of version x time x speed that checks the objectives themselves on
// the version selected: exactly one controllable is set; if a change was
// required, the selected version meets every objective or no_config is
// raised and the running version is kept; no_config is raised only when no
// version meets them; without a required change the version is kept.
module tb_tracking_ctrl;
  import amr_pkg::*;
  logic [1:0]  ver_id;
  logic [15:0] time_i, min_thres, max_thres;
  logic        time_evt, speed_evt, c1, c2, c3, no_config;
  speed_e      speed;
  tracking_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fig. attributes: res, win, wcet
  int RES [4] = '{0, 1, 2, 3};
  int WIN [4] = '{0, 1, 2, 1};
  int WCET[4] = '{0, 5, 4, 3};

  function automatic int sel();
    return c1 ? 1 : c2 ? 2 : c3 ? 3 : 0;
  endfunction

  task automatic apply(input int v, input int t, input bit tev, input speed_e sp, input bit sev);
    ver_id = 2'(v); time_i = 16'(t); time_evt = tev; speed = sp; speed_evt = sev;
    #1;
  endtask

  initial begin
    min_thres = 10; max_thres = 16;
    // start
    apply(0, 0, 0, SPEED_NORMAL, 0); check(sel() == 1 && !no_config, "start with version 1");
    // documented sequence 1 -> 2 -> 3 -> 2 -> 1
    apply(1, 17, 1, SPEED_NORMAL, 0); check(sel() == 2, "slow on V1 -> V2");
    apply(2, 17, 1, SPEED_NORMAL, 0); check(sel() == 3, "slow on V2 -> V3");
    apply(3, 9, 1, SPEED_NORMAL, 0);  check(sel() == 2, "fast on V3 -> V2");
    apply(2, 9, 1, SPEED_NORMAL, 0);  check(sel() == 1, "fast on V2 -> V1");
    apply(2, 12, 1, SPEED_NORMAL, 0); check(sel() == 2 && !no_config, "in range: keep");
    apply(2, 16, 1, SPEED_NORMAL, 0); check(sel() == 3, "time == max_thres counts as slow");
    apply(2, 10, 1, SPEED_NORMAL, 0); check(sel() == 1, "time == min_thres counts as fast");
    apply(3, 17, 1, SPEED_NORMAL, 0); check(sel() == 3 && no_config, "slow on V3: no configuration");
    apply(1, 5, 1, SPEED_NORMAL, 0);  check(sel() == 1 && no_config, "fast on V1: no configuration");
    apply(1, 12, 0, SPEED_HIGH, 1);   check(sel() == 2, "high speed on V1 -> wider window");
    apply(2, 12, 0, SPEED_LOW, 1);    check(sel() == 1, "low speed on V2 -> V1 (tie: fewer resources)");
    apply(2, 12, 0, SPEED_HIGH, 1);   check(sel() == 2 && no_config, "no wider window than V2");
    apply(1, 12, 0, SPEED_HIGH, 0);   check(sel() == 1 && !no_config, "speed without event ignored");
    apply(1, 99, 0, SPEED_NORMAL, 0); check(sel() == 1, "time without event ignored");
    // exhaustive sweep
    for (int v = 1; v <= 3; v++)
      for (int t = 0; t <= 20; t++)
        for (int s = 0; s < 3; s++)
          for (int ev = 0; ev < 4; ev++) begin
            bit slow, fast, wide, narrow, chg, any;
            int n;
            apply(v, t, ev[0], speed_e'(s), ev[1]);
            slow = ev[0] && t >= 16; fast = ev[0] && t <= 10;
            wide = ev[1] && s == 2;  narrow = ev[1] && s == 0;
            chg = slow | fast | wide | narrow;
            any = 0;
            for (int w = 1; w <= 3; w++)
              if (w != v && (!slow || WCET[w] < WCET[v]) && (!fast || WCET[w] > WCET[v]) &&
                  (!wide || WIN[w] > WIN[v]) && (!narrow || WIN[w] < WIN[v])) any = 1;
            check(c1 + c2 + c3 == 1, "exactly one controllable");
            n = sel();
            if (!chg) check(n == v && !no_config, "no change required: keep");
            else if (!any) check(n == v && no_config, "nothing qualifies: keep and notify");
            else begin
              check(!no_config && n != v, "a qualifying version must be chosen");
              if (slow)   check(WCET[n] < WCET[v], "slow: smaller wcet");
              if (fast)   check(WCET[n] > WCET[v], "fast: larger wcet");
              if (wide)   check(WIN[n] > WIN[v], "high speed: wider window");
              if (narrow) check(WIN[n] < WIN[v], "low speed: narrower window");
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
