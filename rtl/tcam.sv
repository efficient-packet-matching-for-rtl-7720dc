// tcam: first-match ternary content-addressable memory.
//
// DEPTH entries of WIDTH bits.  Every entry holds a value, a care mask
// (mask bit 1 = compare this bit, 0 = "do not care") and a valid flag.  A
// search compares the key against all valid entries at once; the lowest
// index that matches wins, as in the first-match TCAM devices the matching
// engines are built on.  The engines rely on that order: longer (more
// specific) entries are written at lower indexes so that all matches can be
// told apart ("true inclusion").
//
// Interface and timing:
//   write port   wr_en/wr_addr/wr_value/wr_mask/wr_valid store one entry per
//                clock; an entry written in cycle t takes part in searches
//                from cycle t+1.
//   search port  search_en and key in cycle t give hit/hit_index/out_valid
//                registered at the end of cycle t (one clock of latency, one
//                search per clock).  hit_index is 0 when there is no hit.
// All entries are invalid after reset.  The registered search result and the
// one-search-per-clock rate follow the published scheme (a search cycle < 4 ns); the
// write port is this design's choice, the published scheme does not describe how
// entries are loaded.
module tcam #(
  parameter int unsigned WIDTH   = 128,
  parameter int unsigned DEPTH   = 2976,
  parameter int unsigned INDEX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // entry write
  input  logic               wr_en,
  input  logic [INDEX_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]   wr_value,
  input  logic [WIDTH-1:0]   wr_mask,
  input  logic               wr_valid,
  // search
  input  logic               search_en,
  input  logic [WIDTH-1:0]   key,
  output logic               out_valid,
  output logic               hit,
  output logic [INDEX_W-1:0] hit_index
);

  // Entry storage as packed arrays (plain registers, one word per entry),
  // one comparator per entry.
  logic [DEPTH-1:0][WIDTH-1:0] value_q, mask_q;
  logic [DEPTH-1:0]            valid_q;
  logic [DEPTH-1:0]            match;
  logic                        wr_ok;

  assign wr_ok = wr_en && (32'(wr_addr) < DEPTH);

  always_ff @(posedge clk) begin
    if (wr_ok) begin
      value_q[wr_addr] <= wr_value;
      mask_q[wr_addr]  <= wr_mask;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q <= '0;
    else if (wr_ok) valid_q[wr_addr] <= wr_valid;
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      match[i] = valid_q[i] && (((key ^ value_q[i]) & mask_q[i]) == '0);
    end
  end

  // Priority encoder: the lowest matching index wins.
  logic               match_any;
  logic [INDEX_W-1:0] match_index;

  always_comb begin
    match_any   = |match;
    match_index = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (match[i]) match_index = INDEX_W'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      hit       <= 1'b0;
      hit_index <= '0;
    end else begin
      out_valid <= search_en;
      hit       <= search_en && match_any;
      hit_index <= (search_en && match_any) ? match_index : '0;
    end
  end

endmodule
