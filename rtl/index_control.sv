// index_control: Index Control Logic of the header rules matching engine.
//
// One entry per header TCAM entry, addressed by the TCAM result HID2.  Each
// entry has three fields:
//   index       address of this entry's rows in the Range List sub-tables;
//   range_hid1  K_RANGES original rule indexes (HID1) whose port ranges must
//               still be checked; slot i goes with sub-table i of the Range
//               List, HID1 = 0 marks an empty slot;
//   simple_hid1 the HID1 of the rule without port ranges that this TCAM
//               entry stands for, 0 if there is none.
// For a TCAM entry shared by several rules (a simple rule and range rules
// that look the same once their ranges are replaced by "do not care" bits)
// one lookup gives all of them.
//
// Interface and timing: the write port stores a whole entry per clock; a
// lookup (rd_en, rd_addr = HID2) gives rd_valid and the fields one clock
// later.  The three fields follow the published scheme; the use of 0 as "none", the
// write port and the registered read are this design's choice.
module index_control #(
  parameter int unsigned DEPTH    = 300,
  parameter int unsigned HID2_W   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned IDX_W    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned HID1_W   = 9,
  parameter int unsigned K_RANGES = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // entry write
  input  logic              wr_en,
  input  logic [HID2_W-1:0] wr_addr,
  input  logic [IDX_W-1:0]  wr_index,
  input  logic [HID1_W-1:0] wr_range_hid1 [K_RANGES],
  input  logic [HID1_W-1:0] wr_simple_hid1,
  // lookup by HID2
  input  logic              rd_en,
  input  logic [HID2_W-1:0] rd_addr,
  output logic              rd_valid,
  output logic [IDX_W-1:0]  rd_index,
  output logic [HID1_W-1:0] rd_range_hid1 [K_RANGES],
  output logic [HID1_W-1:0] rd_simple_hid1
);

  typedef struct packed {
    logic [IDX_W-1:0]                 index;
    logic [K_RANGES-1:0][HID1_W-1:0]  range_hid1;
    logic [HID1_W-1:0]                simple_hid1;
  } entry_t;

  entry_t mem_q [DEPTH];
  entry_t wr_entry, rd_entry_q;

  always_comb begin
    wr_entry.index       = wr_index;
    wr_entry.simple_hid1 = wr_simple_hid1;
    for (int unsigned i = 0; i < K_RANGES; i++) wr_entry.range_hid1[i] = wr_range_hid1[i];
  end

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_addr) < DEPTH) mem_q[wr_addr] <= wr_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid   <= 1'b0;
      rd_entry_q <= '0;
    end else begin
      rd_valid   <= rd_en;
      rd_entry_q <= (rd_en && 32'(rd_addr) < DEPTH) ? mem_q[rd_addr] : '0;
    end
  end

  always_comb begin
    rd_index       = rd_entry_q.index;
    rd_simple_hid1 = rd_entry_q.simple_hid1;
    for (int unsigned i = 0; i < K_RANGES; i++) rd_range_hid1[i] = rd_entry_q.range_hid1[i];
  end

endmodule
