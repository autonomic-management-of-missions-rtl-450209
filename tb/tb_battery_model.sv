// Testbench of the battery level automaton: starts Normal, climbs and falls
// through all levels, saturates at both ends, then random up/down events
// against a reference level counter (up has priority where both apply).
module tb_battery_model;
  import amr_pkg::*;
  logic clk = 0, rst_n = 0, up, down;
  bat_level_e bat;
  always #5 clk = ~clk;
  battery_model dut (.*);

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

  int lvl;   // 0 low, 1 normal, 2 high
  task automatic step(input bit u, d);
    up = u; down = d;
    // up wins where both are possible; an impossible event is ignored
    if (u && lvl < 2) lvl = lvl + 1;
    else if (d && lvl > 0) lvl = lvl - 1;
    @(posedge clk); #1;
    check(int'(bat) == lvl, $sformatf("level %0d expected %0d", bat, lvl));
  endtask

  initial begin
    up = 0; down = 0; lvl = 1;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(bat == BAT_NORMAL, "initial level Normal");
    step(1, 0); check(bat == BAT_HIGH, "Normal -> High");
    step(1, 0); check(bat == BAT_HIGH, "stays High");
    step(0, 1); check(bat == BAT_NORMAL, "High -> Normal");
    step(0, 1); check(bat == BAT_LOW, "Normal -> Low");
    step(0, 1); check(bat == BAT_LOW, "stays Low");
    step(1, 0); check(bat == BAT_NORMAL, "Low -> Normal");
    for (int i = 0; i < 500; i++) step($urandom_range(0, 1), $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
