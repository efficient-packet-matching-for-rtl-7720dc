// true_value_table: one flag per TCAM_1 entry, set when the entry is a
// short pattern (a whole signature no longer than the TCAM_1 width) rather
// than only a piece of a long pattern.  A TCAM_1 hit is reported as a short
// pattern match only when its flag is set.
//
// Interface and timing: a write (wr_en, wr_addr, wr_flag) stores one flag per
// clock.  A lookup (rd_en, rd_addr) returns rd_flag registered one clock
// later; rd_flag is 0 for a cycle with rd_en low.  All flags are clear after
// reset.  The table and its role follow the published scheme; the write port and the
// one-clock registered read are this design's choice.
module true_value_table #(
  parameter int unsigned DEPTH   = 2976,
  parameter int unsigned INDEX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [INDEX_W-1:0] wr_addr,
  input  logic               wr_flag,
  input  logic               rd_en,
  input  logic [INDEX_W-1:0] rd_addr,
  output logic               rd_flag
);

  logic [DEPTH-1:0] flag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_q  <= '0;
      rd_flag <= 1'b0;
    end else begin
      if (wr_en && 32'(wr_addr) < DEPTH) begin
        flag_q[wr_addr] <= wr_flag;
      end
      rd_flag <= rd_en && (32'(rd_addr) < DEPTH) && flag_q[rd_addr];
    end
  end

endmodule
