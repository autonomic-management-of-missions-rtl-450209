// Testbench of the double-banked scheduling table: random row writes,
// commits, ReplaceBy writes and bank switches, compared with a reference
// model of the two banks (active bank visible on rows_o, writes going to the
// other bank, ReplaceBy going to the active bank, swap exchanging them).
module tb_sched_table;
  import amr_pkg::*;
  localparam int NROWS = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en, commit, rb_en, swap, next_valid;
  logic [3:0] wr_idx, rb_idx;
  logic [4:0] commit_len, len_o;
  sched_row_t wr_row, rows_o [NROWS];
  row_id_t rb_val;
  always #5 clk = ~clk;
  sched_table dut (.*);

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

  sched_row_t m_act [NROWS], m_nxt [NROWS];
  int m_len_act, m_len_nxt;
  bit m_valid;
  int swaps = 0;

  function automatic sched_row_t rnd_row();
    sched_row_t r;
    r = sched_row_t'({$urandom, $urandom});
    return r;
  endfunction

  initial begin
    wr_en = 0; commit = 0; rb_en = 0; swap = 0;
    wr_idx = 0; rb_idx = 0; commit_len = 0; wr_row = EMPTY_ROW; rb_val = ROW_NONE;
    for (int i = 0; i < NROWS; i++) begin m_act[i] = EMPTY_ROW; m_nxt[i] = EMPTY_ROW; end
    m_len_act = 0; m_len_nxt = 0; m_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      // compare
      check(int'(len_o) == m_len_act && next_valid == m_valid, "length / next_valid");
      for (int i = 0; i < NROWS; i++) check(rows_o[i] == m_act[i], $sformatf("row %0d", i));
      // drive
      wr_en = 0; commit = 0; rb_en = 0; swap = 0;
      if (m_valid && $urandom_range(0, 7) == 0) begin
        swap = 1;
      end else begin
        wr_en = $urandom_range(0, 1);
        wr_idx = 4'($urandom); wr_row = rnd_row();
        commit = ($urandom_range(0, 15) == 0);
        commit_len = 5'($urandom_range(0, 16));
      end
      rb_en = $urandom_range(0, 1);
      rb_idx = 4'($urandom); rb_val = row_id_t'($urandom);
      @(posedge clk);
      // reference update (same edge semantics)
      if (rb_en) m_act[rb_idx].replace_by = rb_val;
      if (wr_en) m_nxt[wr_idx] = wr_row;
      if (commit) begin m_len_nxt = commit_len; m_valid = 1; end
      if (swap) begin
        sched_row_t t [NROWS];
        int tl;
        t = m_act; m_act = m_nxt; m_nxt = t;
        tl = m_len_act; m_len_act = m_len_nxt; m_len_nxt = tl;
        m_valid = 0; swaps++;
      end
    end
    check(swaps > 50, "too few switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
