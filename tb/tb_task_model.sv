// Testbench of the two-version task automaton: directed start, switch and
// end sequences with the attribute outputs {res, wcet}, then random
// stimulus against a reference transition table.
module tb_task_model;
  logic clk = 0, rst_n = 0, r, c1, c2, e;
  logic [7:0] res, wcet;
  always #5 clk = ~clk;
  task_model #(.RES1(8'd10), .WCET1(8'd40), .RES2(8'd25), .WCET2(8'd15)) dut (.*);

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

  int ref_st;  // 0 Inactive, 1 Vers1, 2 Vers2
  task automatic step(input bit rr, cc1, cc2, ee);
    int nx;
    r = rr; c1 = cc1; c2 = cc2; e = ee;
    nx = ref_st;
    case (ref_st)
      0: if (rr && cc1) nx = 1; else if (rr && cc2) nx = 2;
      1: if (ee) nx = 0; else if (!cc1 && cc2) nx = 2;
      2: if (ee) nx = 0; else if (!cc2 && cc1) nx = 1;
      default: ;
    endcase
    @(posedge clk); #1;
    ref_st = nx;
    check(res  == (ref_st == 1 ? 8'd10 : ref_st == 2 ? 8'd25 : 8'd0), $sformatf("res %0d in %0d", res, ref_st));
    check(wcet == (ref_st == 1 ? 8'd40 : ref_st == 2 ? 8'd15 : 8'd0), $sformatf("wcet %0d in %0d", wcet, ref_st));
  endtask

  initial begin
    r = 0; c1 = 0; c2 = 0; e = 0; ref_st = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(res == 0 && wcet == 0, "inactive outputs {0,0}");
    step(1, 1, 0, 0); check(res == 10, "Vers1 started");
    step(0, 0, 1, 0); check(res == 25, "switch to Vers2");
    step(0, 1, 0, 0); check(res == 10, "switch back to Vers1");
    step(0, 0, 0, 1); check(res == 0, "end");
    step(1, 0, 1, 0); check(wcet == 15, "Vers2 started");
    step(0, 0, 0, 1);
    for (int i = 0; i < 1000; i++)
      step($urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 3) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
