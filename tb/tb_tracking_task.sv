// Testbench of the tracking task automaton: start of each version, every
// version-to-version switch, end, the attribute outputs of each state
// ({res, win, wcet}: V1 {1,1,5}, V2 {2,2,4}, V3 {3,1,3}, OFF {0,0,0}), and
// that nothing changes on clock edges without a step.
module tb_tracking_task;
  import amr_pkg::*;
  logic clk = 0, rst_n = 0, step, r, c1, c2, c3, e, run;
  logic [1:0] ver_id;
  logic [ATTR_W-1:0] res, win, wcet;
  always #5 clk = ~clk;
  tracking_task dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ver(input int v);
    int er, ew, et;
    er = (v == 0) ? 0 : v;
    ew = (v == 2) ? 2 : (v == 0) ? 0 : 1;
    et = (v == 0) ? 0 : 6 - v;
    check(int'(ver_id) == v, $sformatf("version %0d expected %0d", ver_id, v));
    check(run == (v != 0), "run");
    check(int'(res) == er && int'(win) == ew && int'(wcet) == et,
          $sformatf("attributes {%0d,%0d,%0d} in version %0d", res, win, wcet, v));
  endtask

  task automatic do_step(input bit rr, cc1, cc2, cc3, ee);
    r = rr; c1 = cc1; c2 = cc2; c3 = cc3; e = ee; step = 1;
    @(posedge clk); #1;
    step = 0; r = 0; e = 0;
  endtask

  initial begin
    step = 0; r = 0; e = 0; c1 = 0; c2 = 0; c3 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    expect_ver(0);
    // start without permission: stays OFF
    do_step(1, 0, 0, 0, 0); expect_ver(0);
    for (int v = 1; v <= 3; v++) begin
      do_step(1, v == 1, v == 2, v == 3, 0); expect_ver(v);
      // no step: held even with other controllables
      c1 = 1; c2 = 1; c3 = 1; @(posedge clk); #1; expect_ver(v);
      do_step(0, 0, 0, 0, 1); expect_ver(0);
    end
    // all switches i -> j
    for (int i = 1; i <= 3; i++)
      for (int j = 1; j <= 3; j++)
        if (i != j) begin
          do_step(1, i == 1, i == 2, i == 3, 0); expect_ver(i);
          do_step(0, j == 1, j == 2, j == 3, 0); expect_ver(j);
          // e has priority over a switch
          do_step(0, i == 1, i == 2, i == 3, 1); expect_ver(0);
        end
    // a running version stays when its own controllable is kept
    do_step(1, 0, 1, 0, 0); expect_ver(2);
    do_step(0, 0, 1, 0, 0); expect_ver(2);
    do_step(0, 0, 0, 0, 0); expect_ver(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
