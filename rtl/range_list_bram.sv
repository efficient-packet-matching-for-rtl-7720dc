// range_list_bram: one sub-table of the Range List, held in a block RAM.
//
// The Range List keeps, for every Index handed out by the Index Control
// Logic, the source and destination port ranges {SL, SH, DL, DH} of the rules
// that share that Index.  It is split into K sub-tables, one RAM each; row
// "Index" of sub-table i holds the i-th range couple of that Index, so all K
// couples are read in one clock.  Rows without an i-th couple hold the
// invalid couple (nids_pkg::RANGE_INVALID), which no port value satisfies.
// With 300 rows of 8 bytes one sub-table is the 2400 bytes the published
// scheme budgets per BRAM.
//
// Interface and timing: wr_en/wr_addr/wr_range write one row per clock;
// rd_en/rd_addr give rd_range one clock later (a synchronous block RAM
// read).  A read with rd_en low returns the invalid couple.  Rows not yet
// written read as whatever the RAM holds: software writes every row it
// points an Index at.  The table layout follows the published scheme; the ports are
// this design's choice.
module range_list_bram
  import nids_pkg::*;
#(
  parameter int unsigned DEPTH = 300,
  parameter int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_addr,
  input  port_range_t      wr_range,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_addr,
  output port_range_t      rd_range
);

  port_range_t mem_q [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_addr) < DEPTH) mem_q[wr_addr] <= wr_range;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_range <= RANGE_INVALID;
    else        rd_range <= (rd_en && 32'(rd_addr) < DEPTH) ? mem_q[rd_addr] : RANGE_INVALID;
  end

endmodule
