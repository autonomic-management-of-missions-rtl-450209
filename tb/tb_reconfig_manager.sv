// Testbench of the reconfiguration manager, replaying the documented run of
// the tracking manager: stopped (run 0, version 0); a start request starts
// version 1; with max_thres lowered to 16 two execution times of 17 move it
// to version 2 then 3; with min_thres raised to 18 two times of 16 bring it
// back to 2 then 1. Also checks that new thresholds alone cause no step,
// that the version changes one cycle after the step that decides it, that
// cmd_valid marks each change, that a speed report applies once, that
// no_config is reported, and that e stops the task.
module tb_reconfig_manager;
  import amr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic r, e, time_valid, thres_valid, speed_valid;
  logic [15:0] time_i, min_thres_i, max_thres_i;
  speed_e speed_i;
  logic run, cmd_valid, no_config, step_o;
  logic [1:0] ver_id;
  logic [ATTR_W-1:0] res, win, wcet;
  always #5 clk = ~clk;
  reconfig_manager dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cmds = 0;
  always @(posedge clk) if (rst_n && cmd_valid) cmds++;

  task automatic pulse_time(input int t, input int exp_ver, input string msg);
    @(negedge clk);
    time_i = 16'(t); time_valid = 1;
    #1 check(int'(ver_id) == int'(dut.ver_q), "no change before the step edge");
    @(negedge clk);
    time_valid = 0;
    check(int'(ver_id) == exp_ver, $sformatf("%s: version %0d expected %0d", msg, ver_id, exp_ver));
  endtask

  task automatic set_thres(input int lo, input int hi);
    @(negedge clk);
    min_thres_i = 16'(lo); max_thres_i = 16'(hi); thres_valid = 1;
    @(negedge clk);
    thres_valid = 0;
  endtask

  initial begin
    r = 0; e = 0; time_valid = 0; thres_valid = 0; speed_valid = 0;
    time_i = 0; min_thres_i = 0; max_thres_i = 0; speed_i = SPEED_NORMAL;
    repeat (2) @(posedge clk);
    rst_n = 1;
    set_thres(10, 27);
    check(!run && ver_id == 0, "initially stopped");
    @(negedge clk); r = 1;
    @(negedge clk); r = 0;
    check(run && ver_id == 1, "event 1: start with version 1");
    check(cmd_valid, "cmd_valid after a change");
    pulse_time(17, 1, "in range");
    set_thres(10, 16);
    repeat (3) @(negedge clk);
    check(ver_id == 1, "threshold change alone is no step");
    pulse_time(17, 2, "event 2");
    pulse_time(17, 3, "event 3");
    check(wcet == 3 && res == 3, "version 3 attributes");
    set_thres(18, 31);
    pulse_time(16, 2, "event 4");
    pulse_time(16, 1, "event 5");
    pulse_time(16, 1, "fast on version 1");
    check(no_config, "no_config when no slower version exists");
    pulse_time(20, 1, "in range again");
    check(!no_config, "no_config cleared by the next step");
    // speed report: applies at the next step only
    @(negedge clk); speed_i = SPEED_HIGH; speed_valid = 1;
    @(negedge clk); speed_valid = 0;
    check(ver_id == 1, "speed report alone is no step");
    pulse_time(20, 2, "high speed: wider window");
    pulse_time(20, 2, "speed applied once");
    check(!no_config, "a consumed speed report raises nothing");
    @(negedge clk); e = 1;
    @(negedge clk); e = 0;
    check(!run && ver_id == 0, "stopped by e");
    @(negedge clk);
    check(cmds == 7, $sformatf("%0d version changes signalled, 7 expected", cmds));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
