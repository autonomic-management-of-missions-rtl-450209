// Testbench of the tile allocation automaton: every transition of the
// model is driven once in a directed sequence, then random stimulus is
// compared with a reference transition table.
module tb_tile_model;
  import amr_pkg::*;
  logic clk = 0, rst_n = 0, r, c1, c2, e;
  tile_state_e state;
  always #5 clk = ~clk;
  tile_model dut (.*);

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

  int ref_st;   // 0 OFF, 1 Processing, 2 Storage
  task automatic step(input bit rr, cc1, cc2, ee);
    int nx;
    r = rr; c1 = cc1; c2 = cc2; e = ee;
    nx = ref_st;
    case (ref_st)
      0: if (rr && cc1) nx = 1; else if (rr && cc2) nx = 2;
      1: if (ee && !rr) nx = 0; else if (ee && rr && cc2) nx = 2;
      2: if (ee && !rr) nx = 0; else if (ee && rr && cc1) nx = 1;
      default: ;
    endcase
    @(posedge clk); #1;
    ref_st = nx;
    check(int'(state) == ref_st, $sformatf("state %0d expected %0d", state, ref_st));
  endtask

  initial begin
    r = 0; c1 = 0; c2 = 0; e = 0; ref_st = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(state == TILE_OFF, "reset state");
    step(1, 1, 0, 0); check(state == TILE_PROCESSING, "OFF -> Processing");
    step(1, 0, 1, 1); check(state == TILE_STORAGE, "Processing -> Storage");
    step(1, 1, 0, 1); check(state == TILE_PROCESSING, "Storage -> Processing");
    step(0, 0, 0, 1); check(state == TILE_OFF, "Processing -> OFF");
    step(1, 0, 1, 0); check(state == TILE_STORAGE, "OFF -> Storage");
    step(0, 0, 0, 1); check(state == TILE_OFF, "Storage -> OFF");
    for (int i = 0; i < 1000; i++)
      step($urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
