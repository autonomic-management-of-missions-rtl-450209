// Testbench of the two-task exclusion composition. Random requests (never
// r1 and r2 together, as the contract assumes) and random ends of active
// tasks. Checks: the two tasks are never active together; a requested task
// is started (s) no later than the reaction in which it may start, i.e. a
// task waits only while the other one is active; start commands appear only
// for pending or fresh requests.
module tb_twotasks;
  logic clk = 0, rst_n = 0, r1, e1, r2, e2, a1, s1, a2, s2;
  always #5 clk = ~clk;
  twotasks dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit pend1, pend2;     // request seen, task not yet started
  int waits = 0, starts = 0;
  initial begin
    r1 = 0; r2 = 0; e1 = 0; e2 = 0; pend1 = 0; pend2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      r1 = 0; r2 = 0;
      case ($urandom_range(0, 3))
        0: r1 = !a1 && !pend1;
        1: r2 = !a2 && !pend2;
        default: ;
      endcase
      e1 = a1 && ($urandom_range(0, 3) == 0);
      e2 = a2 && ($urandom_range(0, 3) == 0);
      #1;
      check(!(a1 && a2), "both tasks active");
      if (r1) pend1 = 1;
      if (r2) pend2 = 1;
      // a pending task 1 must start unless task 2 stays active
      if (pend1) check(s1 == !(a2 && !e2), "task 1 start decision");
      if (pend2) check(s2 == (!(a1 && !e1) && !s1), "task 2 start decision");
      if (!pend1) check(!s1, "spurious start of task 1");
      if (!pend2) check(!s2, "spurious start of task 2");
      if (pend1 && !s1) waits++;
      if (pend2 && !s2) waits++;
      if (s1) begin pend1 = 0; starts++; end
      if (s2) begin pend2 = 0; starts++; end
    end
    check(waits > 0 && starts > 100, "exclusion never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
