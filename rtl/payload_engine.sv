// payload_engine: payload content matching engine built from two cascaded
// TCAMs, for signatures longer than one TCAM entry.
//
// Patterns no longer than L1_BYTES ("short") sit in TCAM_1 whole, padded
// with "do not care" bytes.  Longer patterns are cut into L1_BYTES pieces,
// each piece stored in TCAM_1 as well; entries are ordered longest first so
// the first-match TCAM still tells overlapping pieces apart.  Every clock one
// stream byte enters the byte window and TCAM_1 is searched with the last
// L1_BYTES bytes.  Its result goes two ways:
//   * through the true value table: a hit on a short pattern is reported on
//     short_valid/short_cid (the CID of a short pattern is its TCAM_1 index);
//   * into the index FIFO, as the hit index or the invalid code (all ones).
// TCAM_2 is searched with the FIFO taps that are L1_BYTES apart, i.e. with
// the TCAM_1 results of N_PIECES consecutive pieces; an entry of TCAM_2 is
// the list of piece indexes of one long pattern.  A TCAM_2 hit is mapped to
// the long pattern's CID by the long CID table and reported on
// long_valid/long_cid.
//
// Timing (one byte per clock, no back-pressure), counting clock edges from
// the edge that takes byte b into the window:
//   edge 0 window holds b -> edge 1 TCAM_1 result -> edge 2 short pattern
//   report and index FIFO push -> edge 3 TCAM_2 result -> edge 4 long
//   pattern report.
// So a short pattern is reported 2 clocks after the byte that completes its
// window.  A long pattern is found when its first piece's result reaches the
// oldest FIFO word A_1, i.e. 4 clocks after the stream byte that lies
// (N_PIECES-1)*L1_BYTES bytes after the one completing its first piece,
// whatever the number of pieces of the pattern.
// A cycle with in_valid low stalls the stream: nothing is searched and the
// index FIFO does not move.
//
// Default sizes are the published scheme's recommended configuration: TCAM_1 16
// bytes wide and 2976 entries (A = 12-bit index), TCAM_2 12 bytes = 8 pieces
// of 12 bits wide and 610 entries.  At 266 MHz this is 2.128 Gb/s.  The write
// ports through which software loads the tables are this design's choice.
module payload_engine #(
  parameter int unsigned L1_BYTES = 16,
  parameter int unsigned N1       = 2976,
  parameter int unsigned A_W      = $clog2(N1 + 1),
  parameter int unsigned N_PIECES = 8,
  parameter int unsigned N2       = 610,
  parameter int unsigned N2_W     = (N2 > 1) ? $clog2(N2) : 1,
  parameter int unsigned CID_W    = N2_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // payload byte stream
  input  logic                    in_valid,
  input  logic [7:0]              in_byte,
  // TCAM_1 and true value table load
  input  logic                    t1_wr_en,
  input  logic [A_W-1:0]          t1_wr_addr,
  input  logic [8*L1_BYTES-1:0]   t1_wr_value,
  input  logic [8*L1_BYTES-1:0]   t1_wr_mask,
  input  logic                    t1_wr_valid,
  input  logic                    t1_wr_short,
  // TCAM_2 and long CID table load
  input  logic                    t2_wr_en,
  input  logic [N2_W-1:0]         t2_wr_addr,
  input  logic [N_PIECES*A_W-1:0] t2_wr_value,
  input  logic [N_PIECES*A_W-1:0] t2_wr_mask,
  input  logic                    t2_wr_valid,
  input  logic [CID_W-1:0]        t2_wr_cid,
  // match reports
  output logic                    short_valid,
  output logic [A_W-1:0]          short_cid,
  output logic                    long_valid,
  output logic [CID_W-1:0]        long_cid
);

  localparam logic [A_W-1:0] INVALID_INDEX = '1;

  if (N1 >= (1 << A_W)) begin : g_check_a_w
    $error("payload_engine: A_W too small, all-ones must not be a TCAM_1 index");
  end

  // ---- byte window and TCAM_1 --------------------------------------------
  logic                  win_valid;
  logic [8*L1_BYTES-1:0] window;

  byte_window #(.L1_BYTES(L1_BYTES)) u_window (
    .clk, .rst_n, .in_valid, .in_byte, .win_valid, .window
  );

  logic           t1_valid, t1_hit;
  logic [A_W-1:0] t1_index;

  tcam #(.WIDTH(8*L1_BYTES), .DEPTH(N1), .INDEX_W(A_W)) u_tcam1 (
    .clk, .rst_n,
    .wr_en(t1_wr_en), .wr_addr(t1_wr_addr), .wr_value(t1_wr_value),
    .wr_mask(t1_wr_mask), .wr_valid(t1_wr_valid),
    .search_en(win_valid), .key(window),
    .out_valid(t1_valid), .hit(t1_hit), .hit_index(t1_index)
  );

  // ---- short pattern report --------------------------------------------
  logic           tv_flag;
  logic [A_W-1:0] t1_index_q;

  true_value_table #(.DEPTH(N1), .INDEX_W(A_W)) u_tvt (
    .clk, .rst_n,
    .wr_en(t1_wr_en), .wr_addr(t1_wr_addr), .wr_flag(t1_wr_short && t1_wr_valid),
    .rd_en(t1_hit), .rd_addr(t1_index), .rd_flag(tv_flag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t1_index_q <= '0;
    else        t1_index_q <= t1_index;
  end

  assign short_valid = tv_flag;
  assign short_cid   = tv_flag ? t1_index_q : '0;

  // ---- index FIFO and TCAM_2 -------------------------------------------
  logic [N_PIECES*A_W-1:0] t2_key;
  logic                    fifo_moved;

  index_fifo #(.A_W(A_W), .L1_BYTES(L1_BYTES), .N_PIECES(N_PIECES)) u_fifo (
    .clk, .rst_n,
    .shift_en(t1_valid),
    .in_index(t1_hit ? t1_index : INVALID_INDEX),
    .key(t2_key)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fifo_moved <= 1'b0;
    else        fifo_moved <= t1_valid;
  end

  logic            t2_valid, t2_hit;
  logic [N2_W-1:0] t2_index;

  tcam #(.WIDTH(N_PIECES*A_W), .DEPTH(N2), .INDEX_W(N2_W)) u_tcam2 (
    .clk, .rst_n,
    .wr_en(t2_wr_en), .wr_addr(t2_wr_addr), .wr_value(t2_wr_value),
    .wr_mask(t2_wr_mask), .wr_valid(t2_wr_valid),
    .search_en(fifo_moved), .key(t2_key),
    .out_valid(t2_valid), .hit(t2_hit), .hit_index(t2_index)
  );

  long_cid_table #(.DEPTH(N2), .INDEX_W(N2_W), .CID_W(CID_W)) u_cid (
    .clk, .rst_n,
    .wr_en(t2_wr_en), .wr_addr(t2_wr_addr), .wr_cid(t2_wr_cid),
    .rd_en(t2_valid && t2_hit), .rd_addr(t2_index),
    .rd_valid(long_valid), .rd_cid(long_cid)
  );

endmodule
