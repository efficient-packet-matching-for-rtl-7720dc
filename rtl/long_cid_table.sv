// long_cid_table: result memory behind TCAM_2.
//
// Because of true inclusion in TCAM_1 one long pattern can need several
// TCAM_2 entries (one per combination of piece indexes that stands for it).
// This table maps each TCAM_2 entry to the content ID (CID) of the long
// pattern it stands for, so the engine reports the pattern, not the entry.
//
// Interface and timing: write port (wr_en, wr_addr, wr_cid) stores one CID
// per clock.  A lookup (rd_en, rd_addr) returns rd_valid/rd_cid one clock
// later; rd_valid follows rd_en.  The CID column of TCAM_2 comes from the published scheme;
// holding it in a separate synchronous RAM with its own write port is this
// design's choice.
module long_cid_table #(
  parameter int unsigned DEPTH   = 610,
  parameter int unsigned INDEX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned CID_W   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [INDEX_W-1:0] wr_addr,
  input  logic [CID_W-1:0]   wr_cid,
  input  logic               rd_en,
  input  logic [INDEX_W-1:0] rd_addr,
  output logic               rd_valid,
  output logic [CID_W-1:0]   rd_cid
);

  logic [CID_W-1:0] cid_q [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_addr) < DEPTH) cid_q[wr_addr] <= wr_cid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_cid   <= '0;
    end else begin
      rd_valid <= rd_en;
      rd_cid   <= (rd_en && 32'(rd_addr) < DEPTH) ? cid_q[rd_addr] : '0;
    end
  end

endmodule
