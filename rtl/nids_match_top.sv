// nids_match_top: packet matching front end of a network intrusion
// detection system, with the two TCAM-based engines side by side.
//
//   payload_engine  scans the reassembled payload byte stream, one byte per
//                   clock, for content signatures of any length up to
//                   N_PIECES * L1_BYTES bytes and reports short and long
//                   pattern CIDs;
//   header_engine   classifies packet 5-tuples against header rules whose
//                   port fields may be ranges, one header per clock, and
//                   reports every matching rule (HID1).
// The two engines share only the clock and reset.  Combining header and
// content results into a rule ID and action, and the TCP/IP processing that
// produces the stream and the headers, happen outside this block, so both
// engines' inputs, table load ports and results are brought out unchanged.
// Timing is that of the engines: a short pattern is reported 2 clocks after
// the byte that completes it, a long pattern 4 + (N_PIECES-1)*L1_BYTES clocks
// after the byte that completes its first piece (with a gapless stream), and
// a header result 4 clocks after the header is pushed into the empty
// header FIFO.  Parameter defaults are the published scheme's
// main configuration.
module nids_match_top
  import nids_pkg::*;
#(
  // payload engine (cascade TCAMs)
  parameter int unsigned L1_BYTES   = 16,
  parameter int unsigned N1         = 2976,
  parameter int unsigned A_W        = $clog2(N1 + 1),
  parameter int unsigned N_PIECES   = 8,
  parameter int unsigned N2         = 610,
  parameter int unsigned N2_W       = (N2 > 1) ? $clog2(N2) : 1,
  parameter int unsigned CID_W      = N2_W,
  // header engine (range matching)
  parameter int unsigned KEY_BYTES  = 16,
  parameter int unsigned N_ENTRIES  = 300,
  parameter int unsigned HID2_W     = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1,
  parameter int unsigned RL_DEPTH   = 300,
  parameter int unsigned IDX_W      = (RL_DEPTH > 1) ? $clog2(RL_DEPTH) : 1,
  parameter int unsigned HID1_W     = 9,
  parameter int unsigned K_RANGES   = 20,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // ---- payload engine ----
  input  logic                    pl_in_valid,
  input  logic [7:0]              pl_in_byte,
  input  logic                    t1_wr_en,
  input  logic [A_W-1:0]          t1_wr_addr,
  input  logic [8*L1_BYTES-1:0]   t1_wr_value,
  input  logic [8*L1_BYTES-1:0]   t1_wr_mask,
  input  logic                    t1_wr_valid,
  input  logic                    t1_wr_short,
  input  logic                    t2_wr_en,
  input  logic [N2_W-1:0]         t2_wr_addr,
  input  logic [N_PIECES*A_W-1:0] t2_wr_value,
  input  logic [N_PIECES*A_W-1:0] t2_wr_mask,
  input  logic                    t2_wr_valid,
  input  logic [CID_W-1:0]        t2_wr_cid,
  output logic                    short_valid,
  output logic [A_W-1:0]          short_cid,
  output logic                    long_valid,
  output logic [CID_W-1:0]        long_cid,
  // ---- header engine ----
  input  logic                    hdr_push,
  input  header_t                 hdr_in,
  output logic                    hdr_full,
  output logic                    hdr_overflow,
  input  logic                    tc_wr_en,
  input  logic [HID2_W-1:0]       tc_wr_addr,
  input  logic [8*KEY_BYTES-1:0]  tc_wr_value,
  input  logic [8*KEY_BYTES-1:0]  tc_wr_mask,
  input  logic                    tc_wr_valid,
  input  logic                    ic_wr_en,
  input  logic [HID2_W-1:0]       ic_wr_addr,
  input  logic [IDX_W-1:0]        ic_wr_index,
  input  logic [HID1_W-1:0]       ic_wr_range_hid1 [K_RANGES],
  input  logic [HID1_W-1:0]       ic_wr_simple_hid1,
  input  logic                    rl_wr_en,
  input  logic [$clog2(K_RANGES+1)-1:0] rl_wr_sel,
  input  logic [IDX_W-1:0]        rl_wr_addr,
  input  port_range_t             rl_wr_range,
  output logic                    hdr_out_valid,
  output logic                    simple_match,
  output logic [HID1_W-1:0]       simple_hid1,
  output logic [K_RANGES-1:0]     range_match,
  output logic [HID1_W-1:0]       range_hid1 [K_RANGES]
);

  payload_engine #(
    .L1_BYTES(L1_BYTES), .N1(N1), .A_W(A_W), .N_PIECES(N_PIECES),
    .N2(N2), .N2_W(N2_W), .CID_W(CID_W)
  ) u_payload (
    .clk, .rst_n,
    .in_valid(pl_in_valid), .in_byte(pl_in_byte),
    .t1_wr_en, .t1_wr_addr, .t1_wr_value, .t1_wr_mask, .t1_wr_valid, .t1_wr_short,
    .t2_wr_en, .t2_wr_addr, .t2_wr_value, .t2_wr_mask, .t2_wr_valid, .t2_wr_cid,
    .short_valid, .short_cid, .long_valid, .long_cid
  );

  header_engine #(
    .KEY_BYTES(KEY_BYTES), .N_ENTRIES(N_ENTRIES), .HID2_W(HID2_W),
    .RL_DEPTH(RL_DEPTH), .IDX_W(IDX_W), .HID1_W(HID1_W),
    .K_RANGES(K_RANGES), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_header (
    .clk, .rst_n,
    .hdr_push, .hdr_in, .hdr_full, .hdr_overflow,
    .tc_wr_en, .tc_wr_addr, .tc_wr_value, .tc_wr_mask, .tc_wr_valid,
    .ic_wr_en, .ic_wr_addr, .ic_wr_index, .ic_wr_range_hid1, .ic_wr_simple_hid1,
    .rl_wr_en, .rl_wr_sel, .rl_wr_addr, .rl_wr_range,
    .out_valid(hdr_out_valid), .simple_match, .simple_hid1, .range_match, .range_hid1
  );

endmodule
