// Testbench of the delayable task automaton: directed sequences through
// Idle -> Active, Idle -> Wait -> Active and Active -> Idle, then random
// stimulus against a reference state machine written from the automaton's
// transition list.
module tb_delayable;
  logic clk = 0, rst_n = 0, r, c, e, a, s;
  always #5 clk = ~clk;
  delayable dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  int ref_st;  // 0 Idle, 1 Wait, 2 Active
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit rr, cc, ee);
    bit exp_s;
    int nx;
    r = rr; c = cc; e = ee;
    #1;
    exp_s = (ref_st == 0) ? (rr & cc) : (ref_st == 1) ? cc : 1'b0;
    check(a == (ref_st == 2), $sformatf("a=%0d in state %0d", a, ref_st));
    check(s == exp_s, $sformatf("s=%0d in state %0d r=%0d c=%0d", s, ref_st, rr, cc));
    nx = ref_st;
    case (ref_st)
      0: if (rr && cc) nx = 2; else if (rr) nx = 1;
      1: if (cc) nx = 2;
      2: if (ee) nx = 0;
      default: ;
    endcase
    ref_st = nx;
    @(posedge clk); #1;
  endtask

  initial begin
    r = 0; c = 0; e = 0; ref_st = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    step(1, 0, 0);   // Idle -> Wait
    check(dut.state == 1, "Wait expected");
    step(0, 0, 0);   // stay Wait
    step(0, 1, 0);   // Wait -> Active, s=1
    check(a == 1, "Active expected");
    step(0, 0, 1);   // Active -> Idle
    check(a == 0, "Idle expected");
    step(1, 1, 0);   // Idle -> Active directly
    check(a == 1, "Active expected after r and c");
    step(0, 0, 1);
    for (int i = 0; i < 1000; i++) step($urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
