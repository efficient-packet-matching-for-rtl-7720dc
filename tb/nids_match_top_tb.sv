// nids_match_top_tb: end-to-end test of both matching engines at their
// default (full) sizes: TCAM_1 16 bytes x 2976 entries, TCAM_2 8 pieces x
// 610 entries, header TCAM 16 bytes x 300 entries, 20 Range List BRAMs.
//
// Payload side.  Random strings build four long signatures and three short
// ones:
//   A  40 bytes  = pieces A1 A2 A3 (A3: 8 bytes + 8 "don't care")
//   B  122 bytes = pieces B1..B8 (the longest case, all 8 TCAM_2 fields)
//   C  20 bytes  = C1 + "ABCD"  (piece C2 = "ABCD" + 12 "don't care")
//   D  32 bytes  = D1 D2, where D1 begins with "ABCD"
// so TCAM_1 hides C2 behind D1 whenever D1 follows C1 (true inclusion) and
// C needs the two TCAM_2 entries {C1,C2} and {C1,D1}.  Short patterns:
// "/bin/sh", "cmd.exe", "|90 90 90 90|".  The stream is random lowercase
// text with the signatures planted in it and idle cycles between bytes.
// Expected reports come from plain string search: a short pattern 2 clocks
// after the byte that completes its 16-byte window, a long pattern 4 clocks
// after the byte 7*16 bytes past the one completing its first piece.
//
// Header side.  The five-rule worked example of the range matching scheme
// (see header_engine_tb), stored in the 300-entry TCAM and read through all
// 20 range slots (slots 2..19 empty), with random headers pushed with gaps
// and each result checked 4 clocks after its push.
//
// Every report is checked for value and clock.  The run counts each
// mechanism (short and long reports, the 8-piece pattern, true inclusion,
// stream stalls, multi-rule header results, simple and range header results,
// header misses) and fails if one never happened.
module nids_match_top_tb;
  import nids_pkg::*;

  // default sizes, restated for the testbench's own arithmetic
  localparam int unsigned L1 = 16, N1 = 2976, AW = 12, NP = 8, N2 = 610, N2W = 10, CW = 10;
  localparam int unsigned KB = 16, NE = 300, HW = 9, RD = 300, IW = 9, H1 = 9, K = 20;
  localparam int unsigned SHORT_LAT = 2, LONG_LAT = 4, HDR_LAT = 4;
  localparam int unsigned NBYTES = 12000;

  logic clk = 0, rst_n = 0;
  // payload
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
  // header
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
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // payload reference data
  // ------------------------------------------------------------------
  string sig [4];             // A, B, C, D
  string shorts [3];
  byte   stream [NBYTES];
  int    byte_cycle [NBYTES];
  int    exp_short [int];
  int    exp_long [int];
  int    short_idx [3];
  int n_short = 0, n_long = 0, n_long8 = 0, n_incl = 0, n_stall = 0;

  function automatic string rand_upper(int n);
    string s;
    s = "";
    for (int i = 0; i < n; i++) s = {s, string'(byte'("A" + $urandom % 26))};
    return s;
  endfunction

  function automatic logic [8*L1-1:0] piece_val(string s, int off, int len);
    logic [8*L1-1:0] v;
    v = '0;
    for (int i = 0; i < len; i++) v[8*L1-1-8*i -: 8] = s[off+i];
    return v;
  endfunction

  function automatic logic [8*L1-1:0] piece_mask(int len);
    logic [8*L1-1:0] m;
    m = '0;
    for (int i = 0; i < len; i++) m[8*L1-1-8*i -: 8] = 8'hFF;
    return m;
  endfunction

  task automatic t1_write(int a, string s, int off, int len, logic sh);
    @(negedge clk);
    t1_wr_en = 1; t1_wr_addr = AW'(a); t1_wr_value = piece_val(s, off, len);
    t1_wr_mask = piece_mask(len); t1_wr_valid = 1; t1_wr_short = sh;
    @(negedge clk);
    t1_wr_en = 0;
  endtask

  // pieces: list of TCAM_1 indexes, first piece first
  task automatic t2_write(int a, int pieces [$], int cid);
    logic [NP*AW-1:0] v, m;
    v = '0; m = '0;
    foreach (pieces[j]) begin
      v[(NP-1-j)*AW +: AW] = AW'(pieces[j]);
      m[(NP-1-j)*AW +: AW] = '1;
    end
    @(negedge clk);
    t2_wr_en = 1; t2_wr_addr = N2W'(a); t2_wr_value = v; t2_wr_mask = m;
    t2_wr_valid = 1; t2_wr_cid = CW'(cid);
    @(negedge clk);
    t2_wr_en = 0;
  endtask

  function automatic bit at(int s, string pat);
    if (s + pat.len() > NBYTES) return 0;
    for (int i = 0; i < pat.len(); i++) if (stream[s+i] != pat[i]) return 0;
    return 1;
  endfunction

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
      end else begin
        exp_long.delete(cyc); n_long++;
        if (long_cid == 2) n_long8++;
      end
    end
  end

  task automatic run_payload();
    bit gap [NBYTES*2];
    int c, t, idx;
    int pa [4][$];  // TCAM_1 indexes of each signature's pieces
    int d1;
    sig[0] = rand_upper(40);
    sig[1] = rand_upper(122);
    sig[3] = {"ABCD", rand_upper(28)};
    sig[2] = {rand_upper(16), "ABCD"};
    shorts[0] = "/bin/sh"; shorts[1] = "cmd.exe";
    shorts[2] = {8'h90, 8'h90, 8'h90, 8'h90};
    // TCAM_1, longest entries first: all full 16-byte pieces, then B8 (10),
    // A3 (8), the short patterns (7, 7, 4) and C2 (4).
    idx = 0;
    d1 = idx; t1_write(idx, sig[3], 0, 16, 0); idx++;
    pa[3].push_back(d1);
    t1_write(idx, sig[3], 16, 16, 0); pa[3].push_back(idx); idx++;
    for (int p = 0; p < 2; p++) begin t1_write(idx, sig[0], 16*p, 16, 0); pa[0].push_back(idx); idx++; end
    for (int p = 0; p < 7; p++) begin t1_write(idx, sig[1], 16*p, 16, 0); pa[1].push_back(idx); idx++; end
    t1_write(idx, sig[2], 0, 16, 0); pa[2].push_back(idx); idx++;
    t1_write(idx, sig[1], 112, 10, 0); pa[1].push_back(idx); idx++;
    t1_write(idx, sig[0], 32, 8, 0); pa[0].push_back(idx); idx++;
    for (int s = 0; s < 3; s++) begin
      short_idx[s] = idx; t1_write(idx, shorts[s], 0, shorts[s].len(), 1); idx++;
    end
    t1_write(idx, sig[2], 16, 4, 0); pa[2].push_back(idx); idx++;
    // TCAM_2: one entry per signature, plus {C1, D1} for C
    t2_write(0, pa[1], 2);
    t2_write(1, pa[0], 1);
    t2_write(2, pa[2], 3);
    t2_write(3, '{pa[2][0], d1}, 3);
    t2_write(4, pa[3], 4);

    // stream: lowercase text with planted signatures, zero tail
    for (int i = 0; i < NBYTES; i++) stream[i] = byte'("a" + $urandom % 26);
    for (int i = 0; i < NBYTES - 300; i += 20 + $urandom % 120) begin
      string p;
      case ($urandom % 8)
        0: p = sig[0];
        1: p = sig[1];
        2: p = sig[2];
        3: p = sig[3];
        4: p = {sig[2], sig[3].substr(4, 31)};   // C immediately followed by rest of D
        5: p = shorts[0];
        6: p = shorts[1];
        default: p = shorts[2];
      endcase
      for (int j = 0; j < p.len(); j++) stream[i+j] = byte'(p[j]);
    end
    for (int i = NBYTES - 140; i < NBYTES; i++) stream[i] = 0;
    for (int i = 0; i < NBYTES*2; i++) gap[i] = ($urandom % 8) == 0;

    @(negedge clk);
    c = cyc + 1; t = 0;
    for (int k = 0; t < NBYTES; k++) begin
      if (gap[k]) begin c++; continue; end
      byte_cycle[t] = c; t++; c++;
    end
    for (int s = 0; s + L1 - 1 < NBYTES; s++) begin
      automatic int done1 = byte_cycle[s + L1 - 1];
      for (int q = 0; q < 3; q++) if (at(s, shorts[q])) exp_short[done1 + SHORT_LAT] = short_idx[q];
      if (s + L1 - 1 + (NP-1)*L1 < NBYTES) begin
        automatic int donel = byte_cycle[s + L1 - 1 + (NP-1)*L1] + LONG_LAT;
        if (at(s, sig[0])) exp_long[donel] = 1;
        if (at(s, sig[1])) exp_long[donel] = 2;
        if (at(s, sig[2])) begin
          exp_long[donel] = 3;
          if (at(s + 16, sig[3].substr(0, 15))) n_incl++;
        end
        if (at(s, sig[3])) exp_long[donel] = 4;
      end
    end

    t = 0;
    for (int k = 0; t < NBYTES; k++) begin
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
  // header side (worked example)
  // ------------------------------------------------------------------
  localparam logic [7:0] ICMP = 1, TCP = 6, UDP = 17;
  int       hexp_cyc [$];
  bit [5:0] hexp_set [$];
  int n_multi = 0, n_simple = 0, n_range = 0, n_miss = 0;

  function automatic logic [8*KB-1:0] key_of(header_t h);
    return {h, {(8*KB - HEADER_BITS){1'b0}}};
  endfunction

  task automatic tc_write(int a, header_t v, header_t m);
    @(negedge clk);
    tc_wr_en = 1; tc_wr_addr = HW'(a); tc_wr_value = key_of(v); tc_wr_mask = key_of(m);
    tc_wr_valid = 1;
    @(negedge clk);
    tc_wr_en = 0;
  endtask

  task automatic ic_write(int a, int idx, int r0, int r1, int s);
    @(negedge clk);
    ic_wr_en = 1; ic_wr_addr = HW'(a); ic_wr_index = IW'(idx);
    for (int i = 0; i < K; i++) ic_wr_range_hid1[i] = '0;
    ic_wr_range_hid1[0] = H1'(r0); ic_wr_range_hid1[1] = H1'(r1); ic_wr_simple_hid1 = H1'(s);
    @(negedge clk);
    ic_wr_en = 0;
  endtask

  task automatic rl_write(int sel, int a, port_range_t r);
    @(negedge clk);
    rl_wr_en = 1; rl_wr_sel = 5'(sel); rl_wr_addr = IW'(a); rl_wr_range = r;
    @(negedge clk);
    rl_wr_en = 0;
  endtask

  function automatic bit [5:0] expected(header_t h);
    bit [5:0] r;
    bit ext, home;
    ext = h.src_ip[31:24] == 8'd10; home = h.dst_ip[31:16] == 16'hC0A8;
    r = '0;
    r[1] = ext && home && h.src_port == 110 && h.dst_port == 23 && h.proto == ICMP;
    r[3] = ext && h.proto == TCP && h.src_port >= 4096 && h.src_port <= 8000 && h.dst_port == 80;
    r[4] = ext && h.proto == TCP && h.src_port >= 80 && h.src_port <= 4000;
    r[5] = ext && h.proto == TCP && h.src_port >= 80;
    r[2] = ext && h.proto == TCP && !(h.src_port[15:12] == 4'h1 && h.dst_port == 80)
           && h.src_port[15:12] != 4'h0;
    return r;
  endfunction

  always @(negedge clk) if (rst_n && hdr_out_valid) begin
    bit [5:0] got, e;
    int ec;
    got = '0;
    if (simple_match) got[simple_hid1] = 1;
    for (int i = 0; i < K; i++) if (range_match[i]) got[range_hid1[i]] = 1;
    checks++;
    if (hexp_cyc.size() == 0) begin failures++; $display("FAIL unexpected header result"); end
    else begin
      ec = hexp_cyc.pop_front(); e = hexp_set.pop_front();
      if (ec != cyc || got != e) begin
        failures++; $display("FAIL header at %0d (exp %0d): got %b exp %b", cyc, ec, got, e);
      end
      if ($countones(got) > 1) n_multi++;
      if (simple_match) n_simple++;
      if (range_match != 0) n_range++;
      if (got == 0) n_miss++;
    end
  end

  task automatic run_header();
    header_t v, m;
    int sv [12] = '{110, 79, 80, 81, 4000, 4001, 4095, 4096, 8000, 8001, 65535, 0};
    int dv [4]  = '{23, 80, 81, 0};
    v = '{src_ip: 32'h0A000000, dst_ip: 32'hC0A80000, src_port: 16'd110, dst_port: 16'd23, proto: ICMP};
    m = '{src_ip: 32'hFF000000, dst_ip: 32'hFFFF0000, src_port: 16'hFFFF, dst_port: 16'hFFFF, proto: 8'hFF};
    tc_write(0, v, m);
    v = '{src_ip: 32'h0A000000, dst_ip: 0, src_port: 16'h1000, dst_port: 16'd80, proto: TCP};
    m = '{src_ip: 32'hFF000000, dst_ip: 0, src_port: 16'hF000, dst_port: 16'hFFFF, proto: 8'hFF};
    tc_write(1, v, m);
    v = '{src_ip: 32'h0A000000, dst_ip: 0, src_port: 16'h0000, dst_port: 0, proto: TCP};
    m = '{src_ip: 32'hFF000000, dst_ip: 0, src_port: 16'hF000, dst_port: 0, proto: 8'hFF};
    tc_write(2, v, m);
    v = '{src_ip: 32'h0A000000, dst_ip: 0, src_port: 0, dst_port: 0, proto: TCP};
    m = '{src_ip: 32'hFF000000, dst_ip: 0, src_port: 0, dst_port: 0, proto: 8'hFF};
    tc_write(3, v, m);
    ic_write(0, 0, 0, 0, 1);
    ic_write(1, 1, 3, 5, 0);
    ic_write(2, 2, 4, 5, 0);
    ic_write(3, 3, 5, 0, 2);
    for (int s = 0; s < K; s++)
      for (int a = 0; a < 4; a++) rl_write(s, a, RANGE_INVALID);
    rl_write(0, 1, '{sl: 4096, sh: 8000, dl: 0, dh: 65535});
    rl_write(0, 2, '{sl: 80, sh: 4000, dl: 0, dh: 65535});
    rl_write(0, 3, '{sl: 80, sh: 65535, dl: 0, dh: 65535});
    rl_write(1, 1, '{sl: 80, sh: 65535, dl: 0, dh: 65535});
    rl_write(1, 2, '{sl: 80, sh: 65535, dl: 0, dh: 65535});
    repeat (HDR_LAT + 2) @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      header_t h;
      bit push;
      push = ($urandom % 4) != 0;
      h.src_ip   = ($urandom % 4 != 0) ? {8'd10, 24'($urandom)} : $urandom;
      h.dst_ip   = ($urandom % 2 != 0) ? {16'hC0A8, 16'($urandom)} : $urandom;
      h.src_port = ($urandom % 5 == 0) ? 16'($urandom) : 16'(sv[$urandom % 12]);
      h.dst_port = ($urandom % 5 == 0) ? 16'($urandom) : 16'(dv[$urandom % 4]);
      case ($urandom % 4)
        0: begin h.proto = ICMP; if ($urandom % 2 == 0) begin h.src_port = 110; h.dst_port = 23; end end
        1: h.proto = UDP;
        default: h.proto = TCP;
      endcase
      hdr_push = push; hdr_in = h;
      if (push) begin hexp_cyc.push_back(cyc + 1 + HDR_LAT); hexp_set.push_back(expected(h)); end
      @(negedge clk);
      checks++;
      if (hdr_overflow) begin failures++; $display("FAIL header queue overflow"); end
    end
    hdr_push = 0;
    repeat (HDR_LAT + 4) @(negedge clk);
    checks++;
    if (hexp_cyc.size() != 0) begin failures++; $display("FAIL %0d header results missing", hexp_cyc.size()); end
  endtask

  initial begin
    for (int i = 0; i < K; i++) ic_wr_range_hid1[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      run_payload();
      run_header();
    join
    checks++;
    if (n_short == 0 || n_long == 0 || n_long8 == 0 || n_incl == 0 || n_stall == 0 ||
        n_multi == 0 || n_simple == 0 || n_range == 0 || n_miss == 0) begin
      failures++; $display("FAIL mechanism not exercised");
    end
    $display("payload: short=%0d long=%0d eight_piece=%0d true_inclusion=%0d stalls=%0d",
             n_short, n_long, n_long8, n_incl, n_stall);
    $display("header: multiple=%0d simple=%0d range=%0d miss=%0d", n_multi, n_simple, n_range, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
