// nids_capacity_tb: both engines at their default sizes with every table
// full, the worst-case loading the sizes were chosen for.
//
// Payload side: 610 long signatures of 4 x 16-byte pieces (2440 TCAM_1
// entries) plus 536 short 16-byte signatures fill TCAM_1's 2976 entries; the
// 610 long signatures fill TCAM_2.  Piece contents are pseudo-random
// upper-case strings made from the entry number.  A lower-case stream with
// randomly chosen signatures planted in it, and idle cycles, is fed in; the
// planted positions are the expected reports (a short signature 2 clocks
// after its last byte, a long one 4 clocks after the byte 7*16 bytes past
// the end of its first piece).
//
// Header side: 300 TCAM entries, each exact on destination address
// 10.0.x.e (e = 0..299) and wildcard elsewhere, each with all 20 range slots
// used: slot i names rule ((e+i) mod 300)+1 with source range
// [1000*i, 65535] and destination range [100*e, 100*e+5000]; even entries
// also name the simple rule e+1.  That is 300 x 20 range couples in 20
// Range List RAMs of 300 rows, the worst case the sizes allow.  Random
// headers are checked against these formulas, 4 clocks after each push.
module nids_capacity_tb;
  import nids_pkg::*;

  localparam int unsigned L1 = 16, N1 = 2976, AW = 12, NP = 8, N2 = 610, N2W = 10, CW = 10;
  localparam int unsigned KB = 16, NE = 300, HW = 9, RD = 300, IW = 9, H1 = 9, K = 20;
  localparam int unsigned SHORT_LAT = 2, LONG_LAT = 4, HDR_LAT = 4;
  localparam int unsigned NLONG = 610, NPIECE = 4, NSHORT = N1 - NLONG*NPIECE;
  localparam int unsigned NBYTES = 16000;

  logic clk = 0, rst_n = 0;
  logic pl_in_valid = 0;
  logic [7:0] pl_in_byte = 0;
  logic t1_wr_en = 0, t1_wr_valid = 0, t1_wr_short = 0;
  logic [AW-1:0] t1_wr_addr = '0;
  logic [8*L1-1:0] t1_wr_value = '0, t1_wr_mask = '0;
  logic t2_wr_en = 0, t2_wr_valid = 0;
  logic [N2W-1:0] t2_wr_addr = '0;
  logic [NP*AW-1:0] t2_wr_value = '0, t2_wr_mask = '0;
  logic [CW-1:0] t2_wr_cid = '0;
  logic short_valid, long_valid;
  logic [AW-1:0] short_cid;
  logic [CW-1:0] long_cid;
  logic hdr_push = 0;
  header_t hdr_in = '0;
  logic hdr_full, hdr_overflow;
  logic tc_wr_en = 0, tc_wr_valid = 0;
  logic [HW-1:0] tc_wr_addr = '0;
  logic [8*KB-1:0] tc_wr_value = '0, tc_wr_mask = '0;
  logic ic_wr_en = 0;
  logic [HW-1:0] ic_wr_addr = '0;
  logic [IW-1:0] ic_wr_index = '0;
  logic [H1-1:0] ic_wr_range_hid1 [K];
  logic [H1-1:0] ic_wr_simple_hid1 = '0;
  logic rl_wr_en = 0;
  logic [4:0] rl_wr_sel = '0;
  logic [IW-1:0] rl_wr_addr = '0;
  port_range_t rl_wr_range = '0;
  logic hdr_out_valid, simple_match;
  logic [H1-1:0] simple_hid1;
  logic [K-1:0] range_match;
  logic [H1-1:0] range_hid1 [K];

  nids_match_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 16 pseudo-random upper-case bytes for TCAM_1 entry number n
  function automatic logic [8*L1-1:0] entry_text(int n);
    logic [8*L1-1:0] v;
    int unsigned h;
    h = 32'h9E3779B9 * (n + 1) + 32'h7F4A7C15;
    for (int j = 0; j < L1; j++) begin
      h = h * 1664525 + 1013904223;
      v[8*L1-1-8*j -: 8] = 8'("A" + (h >> 16) % 26);
    end
    return v;
  endfunction

  // ------------------------------------------------------------------
  // payload
  // ------------------------------------------------------------------
  byte stream [NBYTES];
  int  byte_cycle [NBYTES];
  int  exp_short [int];
  int  exp_long [int];
  bit  long_seen [NLONG];
  int  n_short = 0, n_long = 0, n_stall = 0;

  always @(negedge clk) if (rst_n) begin
    if (short_valid) begin
      checks++;
      if (!exp_short.exists(cyc) || exp_short[cyc] != int'(short_cid)) begin
        failures++; $display("FAIL unexpected short cid=%0d at %0d", short_cid, cyc);
      end else begin exp_short.delete(cyc); n_short++; end
    end
    if (long_valid) begin
      checks++;
      if (!exp_long.exists(cyc) || exp_long[cyc] != int'(long_cid)) begin
        failures++; $display("FAIL unexpected long cid=%0d at %0d", long_cid, cyc);
      end else begin exp_long.delete(cyc); n_long++; long_seen[long_cid] = 1; end
    end
  end

  task automatic run_payload();
    bit gap [NBYTES*2];
    int c, t;
    int plant_pos [$], plant_id [$];
    // TCAM_1: long m piece p at 4m+p, short k at 2440+k
    for (int n = 0; n < int'(N1); n++) begin
      @(negedge clk);
      t1_wr_en = 1; t1_wr_addr = AW'(n); t1_wr_value = entry_text(n); t1_wr_mask = '1;
      t1_wr_valid = 1; t1_wr_short = (n >= int'(NLONG*NPIECE));
    end
    @(negedge clk); t1_wr_en = 0;
    // TCAM_2: long m = {4m, 4m+1, 4m+2, 4m+3, *, *, *, *}, CID m
    for (int m = 0; m < int'(NLONG); m++) begin
      logic [NP*AW-1:0] v, mk;
      v = '0; mk = '0;
      for (int p = 0; p < int'(NPIECE); p++) begin
        v[(NP-1-p)*AW +: AW] = AW'(NPIECE*m + p);
        mk[(NP-1-p)*AW +: AW] = '1;
      end
      @(negedge clk);
      t2_wr_en = 1; t2_wr_addr = N2W'(m); t2_wr_value = v; t2_wr_mask = mk;
      t2_wr_valid = 1; t2_wr_cid = CW'(m);
    end
    @(negedge clk); t2_wr_en = 0;

    // stream
    for (int i = 0; i < int'(NBYTES); i++) stream[i] = byte'("a" + $urandom % 26);
    for (int i = 0; i < int'(NBYTES) - 300; ) begin
      int id, len;
      id = $urandom % (NLONG + NSHORT);
      len = (id < int'(NLONG)) ? NPIECE*L1 : L1;
      plant_pos.push_back(i); plant_id.push_back(id);
      for (int p = 0; p < len / int'(L1); p++) begin
        logic [8*L1-1:0] txt;
        txt = entry_text(id < int'(NLONG) ? NPIECE*id + p : NLONG*NPIECE + (id - NLONG));
        for (int j = 0; j < int'(L1); j++) stream[i + L1*p + j] = byte'(txt[8*L1-1-8*j -: 8]);
      end
      i += len + $urandom % 12;
    end
    for (int i = NBYTES - 140; i < int'(NBYTES); i++) stream[i] = 0;
    for (int i = 0; i < int'(NBYTES*2); i++) gap[i] = ($urandom % 10) == 0;

    @(negedge clk);
    c = cyc + 1; t = 0;
    for (int k = 0; t < int'(NBYTES); k++) begin
      if (gap[k]) begin c++; continue; end
      byte_cycle[t] = c; t++; c++;
    end
    foreach (plant_pos[q]) begin
      int s, id;
      s = plant_pos[q]; id = plant_id[q];
      if (id < int'(NLONG)) exp_long[byte_cycle[s + L1 - 1 + (NP-1)*L1] + LONG_LAT] = id;
      else exp_short[byte_cycle[s + L1 - 1] + SHORT_LAT] = NLONG*NPIECE + (id - NLONG);
    end

    t = 0;
    for (int k = 0; t < int'(NBYTES); k++) begin
      if (gap[k]) begin pl_in_valid = 0; n_stall++; end
      else begin pl_in_valid = 1; pl_in_byte = stream[t]; t++; end
      @(negedge clk);
    end
    pl_in_valid = 0;
    repeat (LONG_LAT + 4) @(negedge clk);
    checks++;
    if (exp_short.num() != 0 || exp_long.num() != 0) begin
      failures++; $display("FAIL missed payload reports: short %0d long %0d", exp_short.num(), exp_long.num());
    end
  endtask

  // ------------------------------------------------------------------
  // header
  // ------------------------------------------------------------------
  int hexp_cyc [$];
  bit [300:0] hexp_set [$];
  int n_results = 0, max_results = 0, n_miss = 0;

  function automatic bit [300:0] expected(header_t h);
    bit [300:0] r;
    int e;
    r = '0;
    if (h.dst_ip[31:16] != 16'h0A00 || h.dst_ip[15:0] >= 300) return r;
    e = h.dst_ip[15:0];
    if (e % 2 == 0) r[e + 1] = 1;
    for (int i = 0; i < int'(K); i++)
      if (int'(h.src_port) >= 1000*i && int'(h.dst_port) >= 100*e && int'(h.dst_port) <= 100*e + 5000)
        r[(e + i) % 300 + 1] = 1;
    return r;
  endfunction

  always @(negedge clk) if (rst_n && hdr_out_valid) begin
    bit [300:0] got, ex;
    int ec;
    got = '0;
    if (simple_match) got[simple_hid1] = 1;
    for (int i = 0; i < int'(K); i++) if (range_match[i]) got[range_hid1[i]] = 1;
    checks++;
    if (hexp_cyc.size() == 0) begin failures++; $display("FAIL unexpected header result"); end
    else begin
      ec = hexp_cyc.pop_front(); ex = hexp_set.pop_front();
      if (ec != cyc || got != ex) begin failures++; $display("FAIL header result at %0d", cyc); end
      if ($countones(got) > max_results) max_results = $countones(got);
      if (got == 0) n_miss++;
      n_results++;
    end
  end

  task automatic run_header();
    for (int e = 0; e < int'(NE); e++) begin
      header_t v, m;
      v = '0; m = '0;
      v.dst_ip = {16'h0A00, 16'(e)}; m.dst_ip = '1;
      @(negedge clk);
      tc_wr_en = 1; tc_wr_addr = HW'(e); tc_wr_valid = 1;
      tc_wr_value = {v, 24'h0}; tc_wr_mask = {m, 24'h0};
      @(negedge clk);
      tc_wr_en = 0;
      ic_wr_en = 1; ic_wr_addr = HW'(e); ic_wr_index = IW'(e);
      for (int i = 0; i < int'(K); i++) ic_wr_range_hid1[i] = H1'((e + i) % 300 + 1);
      ic_wr_simple_hid1 = (e % 2 == 0) ? H1'(e + 1) : '0;
      @(negedge clk);
      ic_wr_en = 0;
      for (int i = 0; i < int'(K); i++) begin
        rl_wr_en = 1; rl_wr_sel = 5'(i); rl_wr_addr = IW'(e);
        rl_wr_range = '{sl: 16'(1000*i), sh: 16'hFFFF, dl: 16'(100*e),
                        dh: (100*e + 5000 > 65535) ? 16'hFFFF : 16'(100*e + 5000)};
        @(negedge clk);
      end
      rl_wr_en = 0;
    end
    repeat (HDR_LAT + 2) @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      header_t h;
      bit push;
      int e;
      push = ($urandom % 5) != 0;
      e = $urandom % 320;
      h.src_ip = $urandom;
      h.dst_ip = {16'h0A00, 16'(e)};
      h.src_port = ($urandom % 3 == 0) ? 16'hFFFF : 16'($urandom % 25000);
      h.dst_port = 16'(100*(e % 300) + int'($urandom % 6000) - 500);
      h.proto = 8'($urandom);
      hdr_push = push; hdr_in = h;
      if (push) begin hexp_cyc.push_back(cyc + 1 + HDR_LAT); hexp_set.push_back(expected(h)); end
      @(negedge clk);
    end
    hdr_push = 0;
    repeat (HDR_LAT + 4) @(negedge clk);
    checks++;
    if (hexp_cyc.size() != 0) begin failures++; $display("FAIL %0d header results missing", hexp_cyc.size()); end
  endtask

  initial begin
    int distinct;
    for (int i = 0; i < int'(K); i++) ic_wr_range_hid1[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      run_payload();
      run_header();
    join
    distinct = 0;
    foreach (long_seen[i]) if (long_seen[i]) distinct++;
    checks++;
    if (n_short == 0 || n_long == 0 || n_stall == 0 || max_results < int'(K) || n_miss == 0) begin
      failures++; $display("FAIL mechanism not exercised");
    end
    $display("payload: short=%0d long=%0d distinct_long=%0d stalls=%0d", n_short, n_long, distinct, n_stall);
    $display("header: results=%0d most_rules_in_one_result=%0d miss=%0d", n_results, max_results, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
