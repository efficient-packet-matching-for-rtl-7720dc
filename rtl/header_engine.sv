// header_engine: header rules matching engine with range matching offloaded
// from the TCAM.
//
// Port fields given as ranges would need many TCAM entries each if they were
// turned into prefixes.  Instead every rule goes into the header TCAM with its
// port ranges replaced by "do not care" bits (exact ports stay exact), and
// the ranges are checked afterwards by comparators:
//   1. header FIFO: queues incoming 5-tuples; the head is searched and popped
//      every clock it is present;
//   2. header TCAM (KEY_BYTES wide): gives HID2, the TCAM entry that matched
//      first; entries that several rules share are stored once;
//   3. Index Control Logic: HID2 -> Index, the Range HID1 slots and the Simple
//      HID1;
//   4. Range List: K_RANGES block RAMs read in parallel at Index, giving one
//      port range couple per Range HID1 slot;
//   5. K_RANGES RMEs compare the packet's ports with the couples, and the
//      result mask reports every Range HID1 whose RME said Y = 1, together
//      with the Simple HID1.
// So one packet can match several rules and they are all reported in the
// same clock.
//
// TCAM key layout: the 104-bit 5-tuple {src_ip, dst_ip, src_port, dst_port,
// proto} in the most significant bits, the remaining KEY_BYTES*8-104 bits
// zero (write them "do not care").
//
// Timing: the five parts form a pipeline taking one header per clock.  A
// header pushed into the empty FIFO at clock edge e is searched in the TCAM
// in the following cycle and has its result on out_valid and the match
// outputs from edge e+4 (TCAM, Index Control, Range List, mask registers).
// Defaults are the published scheme's: a 16-byte, 300-entry TCAM, 20 range slots per
// Index (20 BRAMs of 300 x 8 bytes).  The FIFO depth, the key layout, the
// use of HID1 = 0 for "no rule" and the table write ports are this design's.
module header_engine
  import nids_pkg::*;
#(
  parameter int unsigned KEY_BYTES  = 16,
  parameter int unsigned N_ENTRIES  = 300,
  parameter int unsigned HID2_W     = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1,
  parameter int unsigned RL_DEPTH   = 300,
  parameter int unsigned IDX_W      = (RL_DEPTH > 1) ? $clog2(RL_DEPTH) : 1,
  parameter int unsigned HID1_W     = 9,
  parameter int unsigned K_RANGES   = 20,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // packet headers
  input  logic                   hdr_push,
  input  header_t                hdr_in,
  output logic                   hdr_full,
  output logic                   hdr_overflow,
  // header TCAM load
  input  logic                   tc_wr_en,
  input  logic [HID2_W-1:0]      tc_wr_addr,
  input  logic [8*KEY_BYTES-1:0] tc_wr_value,
  input  logic [8*KEY_BYTES-1:0] tc_wr_mask,
  input  logic                   tc_wr_valid,
  // Index Control Logic load
  input  logic                   ic_wr_en,
  input  logic [HID2_W-1:0]      ic_wr_addr,
  input  logic [IDX_W-1:0]       ic_wr_index,
  input  logic [HID1_W-1:0]      ic_wr_range_hid1 [K_RANGES],
  input  logic [HID1_W-1:0]      ic_wr_simple_hid1,
  // Range List load: sub-table rl_wr_sel, row rl_wr_addr
  input  logic                   rl_wr_en,
  input  logic [$clog2(K_RANGES+1)-1:0] rl_wr_sel,
  input  logic [IDX_W-1:0]       rl_wr_addr,
  input  port_range_t            rl_wr_range,
  // results, one per packet
  output logic                   out_valid,
  output logic                   simple_match,
  output logic [HID1_W-1:0]      simple_hid1,
  output logic [K_RANGES-1:0]    range_match,
  output logic [HID1_W-1:0]      range_hid1 [K_RANGES]
);

  localparam int unsigned KEY_W = 8 * KEY_BYTES;

  if (KEY_W < HEADER_BITS) begin : g_check_key
    $error("header_engine: KEY_BYTES too small for the 5-tuple");
  end

  // ---- 1. header FIFO ---------------------------------------------------
  header_t fifo_head;
  logic    fifo_empty;

  header_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(hdr_push), .wr_header(hdr_in),
    .pop(!fifo_empty), .rd_header(fifo_head),
    .empty(fifo_empty), .full(hdr_full), .overflow(hdr_overflow)
  );

  // ---- 2. header TCAM -----------------------------------------------------
  logic [KEY_W-1:0]  key;
  logic              tc_valid, tc_hit;
  logic [HID2_W-1:0] hid2;

  assign key = {fifo_head, {(KEY_W - HEADER_BITS){1'b0}}};

  tcam #(.WIDTH(KEY_W), .DEPTH(N_ENTRIES), .INDEX_W(HID2_W)) u_tcam (
    .clk, .rst_n,
    .wr_en(tc_wr_en), .wr_addr(tc_wr_addr), .wr_value(tc_wr_value),
    .wr_mask(tc_wr_mask), .wr_valid(tc_wr_valid),
    .search_en(!fifo_empty), .key(key),
    .out_valid(tc_valid), .hit(tc_hit), .hit_index(hid2)
  );

  // Ports travel alongside the pipeline to the RMEs.
  logic [15:0] sport_s1, dport_s1, sport_s2, dport_s2, sport_s3, dport_s3;
  logic        hit_s2, hit_s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sport_s1 <= '0; dport_s1 <= '0;
      sport_s2 <= '0; dport_s2 <= '0;
      sport_s3 <= '0; dport_s3 <= '0;
      hit_s2   <= 1'b0;
      hit_s3   <= 1'b0;
    end else begin
      sport_s1 <= fifo_head.src_port; dport_s1 <= fifo_head.dst_port;
      sport_s2 <= sport_s1;           dport_s2 <= dport_s1;
      sport_s3 <= sport_s2;           dport_s3 <= dport_s2;
      hit_s2   <= tc_valid && tc_hit;
      hit_s3   <= hit_s2;
    end
  end

  // ---- 3. Index Control Logic -------------------------------------------
  // The lookup is made for every packet; ic_valid marks a packet in stage 2.
  logic              ic_valid;
  logic [IDX_W-1:0]  ic_index;
  logic [HID1_W-1:0] ic_range_hid1 [K_RANGES];
  logic [HID1_W-1:0] ic_simple_hid1;

  index_control #(
    .DEPTH(N_ENTRIES), .HID2_W(HID2_W), .IDX_W(IDX_W),
    .HID1_W(HID1_W), .K_RANGES(K_RANGES)
  ) u_icl (
    .clk, .rst_n,
    .wr_en(ic_wr_en), .wr_addr(ic_wr_addr), .wr_index(ic_wr_index),
    .wr_range_hid1(ic_wr_range_hid1), .wr_simple_hid1(ic_wr_simple_hid1),
    .rd_en(tc_valid), .rd_addr(hid2),
    .rd_valid(ic_valid), .rd_index(ic_index),
    .rd_range_hid1(ic_range_hid1), .rd_simple_hid1(ic_simple_hid1)
  );

  logic              valid_s3;
  logic [HID1_W-1:0] range_hid1_s3 [K_RANGES];
  logic [HID1_W-1:0] simple_hid1_s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_s3       <= 1'b0;
      simple_hid1_s3 <= '0;
      for (int unsigned i = 0; i < K_RANGES; i++) range_hid1_s3[i] <= '0;
    end else begin
      valid_s3       <= ic_valid;
      simple_hid1_s3 <= ic_simple_hid1;
      for (int unsigned i = 0; i < K_RANGES; i++) range_hid1_s3[i] <= ic_range_hid1[i];
    end
  end

  // ---- 4. Range List and 5. RMEs --------------------------------------------
  logic [K_RANGES-1:0] y;

  for (genvar g = 0; g < K_RANGES; g++) begin : g_range
    port_range_t couple;

    range_list_bram #(.DEPTH(RL_DEPTH), .IDX_W(IDX_W)) u_bram (
      .clk, .rst_n,
      .wr_en(rl_wr_en && rl_wr_sel == ($clog2(K_RANGES+1))'(g)),
      .wr_addr(rl_wr_addr), .wr_range(rl_wr_range),
      .rd_en(ic_valid && hit_s2), .rd_addr(ic_index),
      .rd_range(couple)
    );

    rme u_rme (
      .range_i(couple), .src_port(sport_s3), .dst_port(dport_s3), .y(y[g])
    );
  end

  result_mask #(.HID1_W(HID1_W), .K_RANGES(K_RANGES)) u_mask (
    .clk, .rst_n,
    .in_valid(valid_s3), .in_hit(hit_s3), .y(y),
    .range_hid1(range_hid1_s3), .simple_hid1(simple_hid1_s3),
    .out_valid, .range_match, .range_hid1_out(range_hid1),
    .simple_match, .simple_hid1_out(simple_hid1)
  );

endmodule
