// Double-banked scheduling table.
//
// Holds two scheduling tables of NROWS rows each (row format sched_row_t:
// TileID, FileID, Next, Load, Activate, Countdown, Count, TaskID, ReplaceBy,
// Starting). One bank is active and is presented in full to the scheduler on
// rows_o together with its length; the other receives the next table from
// the table generator (wr_*), after which commit marks it valid with its
// length. The generator may also rewrite the ReplaceBy column of the active
// bank (rb_*), which is how a table switch is requested. swap, issued by the
// scheduler at a DAG boundary, makes the next bank active and clears
// next_valid. The row format follows the scheduling-table description; the
// double banking, the write ports and the explicit length are this design's
// choices. All writes take effect at the rising edge; rows_o is read
// combinationally. Reset gives two empty tables.
module sched_table
  import amr_pkg::*;
#(
  parameter int NROWS = 16,
  localparam int IDX_W = $clog2(NROWS),
  localparam int LEN_W = $clog2(NROWS + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // next-table writes
  input  logic                   wr_en,
  input  logic [IDX_W-1:0]       wr_idx,
  input  sched_row_t             wr_row,
  input  logic                   commit,
  input  logic [LEN_W-1:0]       commit_len,
  // ReplaceBy writes into the active table
  input  logic                   rb_en,
  input  logic [IDX_W-1:0]       rb_idx,
  input  row_id_t                rb_val,
  // bank switch
  input  logic                   swap,
  output sched_row_t             rows_o [NROWS],
  output logic [LEN_W-1:0]       len_o,
  output logic                   next_valid
);
  sched_row_t       bank [2][NROWS];
  logic [LEN_W-1:0] len  [2];
  logic             act;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      act        <= 1'b0;
      next_valid <= 1'b0;
      len[0]     <= '0;
      len[1]     <= '0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < NROWS; i++) bank[b][i] <= EMPTY_ROW;
    end else begin
      if (wr_en) bank[~act][wr_idx] <= wr_row;
      if (rb_en) bank[act][rb_idx].replace_by <= rb_val;
      if (commit) begin
        len[~act]  <= commit_len;
        next_valid <= 1'b1;
      end
      if (swap) begin
        act        <= ~act;
        next_valid <= 1'b0;
      end
    end

  always_comb begin
    for (int i = 0; i < NROWS; i++) rows_o[i] = bank[act][i];
    len_o = len[act];
  end

  a_swap_valid: assert property (@(posedge clk) disable iff (!rst_n) swap |-> next_valid)
    else $error("swap without a valid next table");
  a_no_write_on_swap: assert property (@(posedge clk) disable iff (!rst_n) swap |-> !(wr_en || commit))
    else $error("next table written while switching");
endmodule
