// Testbench of the device status automaton: Avail after reset, b takes the
// device, a releases it, other inputs leave the state alone; then random
// events against a reference.
module tb_device_model;
  import amr_pkg::*;
  logic clk = 0, rst_n = 0, a, b;
  dev_state_e dev;
  always #5 clk = ~clk;
  device_model dut (.*);

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

  bit busy;
  task automatic step(input bit aa, bb);
    a = aa; b = bb;
    if (!busy && bb) busy = 1; else if (busy && aa) busy = 0;
    @(posedge clk); #1;
    check((dev == DEV_BUSY) == busy, $sformatf("dev %0d expected busy=%0d", dev, busy));
  endtask

  initial begin
    a = 0; b = 0; busy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(dev == DEV_AVAIL, "initial Avail");
    step(1, 0); check(dev == DEV_AVAIL, "a in Avail has no effect");
    step(0, 1); check(dev == DEV_BUSY, "b takes the device");
    step(0, 1); check(dev == DEV_BUSY, "b in Busy has no effect");
    step(1, 0); check(dev == DEV_AVAIL, "a releases it");
    for (int i = 0; i < 500; i++) step($urandom_range(0, 1), $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
