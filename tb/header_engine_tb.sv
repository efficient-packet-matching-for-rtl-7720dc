// header_engine_tb: end-to-end test of the header rules matching engine.
//
// Loads the worked example of the range matching scheme (K = 2 range slots):
//   rule 1  EXTERNAL_NET -> HOME_NET  sport 110          dport 23  ICMP
//   rule 2  EXTERNAL_NET -> any       sport any          dport any TCP
//   rule 3  EXTERNAL_NET -> any       sport [4096,8000]  dport 80  TCP
//   rule 4  EXTERNAL_NET -> any       sport [80,4000]    dport any TCP
//   rule 5  EXTERNAL_NET -> any       sport [80,65535]   dport any TCP
// as four TCAM entries (HID2 1..4 at addresses 0..3; source port 0x1*** for
// rule 3, 0x0*** for rule 4, rules 2 and 5 sharing the all-"don't care"
// entry), the Index Control table {-,1,2,3} / {-,{3,5},{4,5},{5}} /
// {1,-,-,2} and the Range List split into two sub-tables.  EXTERNAL_NET is
// taken as 10.0.0.0/8 and HOME_NET as 192.168.0.0/16 for the test.
// Random headers (ports drawn near the range bounds) are pushed with random
// gaps.  The expected rule set of each header is computed from the rule
// list above; rule 2 is expected only when the header falls through to the
// shared entry, since the example's table lists it nowhere else.  Every
// result is checked for content and for arriving exactly 4 clocks after the
// header was pushed into the empty queue, one header per clock.
module header_engine_tb;
  import nids_pkg::*;
  localparam int unsigned KB = 16, NE = 8, HW = 3, RD = 4, IW = 2, H1 = 9, K = 2, FD = 4;
  localparam int unsigned LAT = 4;
  localparam logic [7:0] ICMP = 1, TCP = 6, UDP = 17;

  logic clk = 0, rst_n = 0;
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
  logic [1:0] rl_wr_sel = '0;
  logic [IW-1:0] rl_wr_addr = '0;
  port_range_t rl_wr_range = '0;
  logic out_valid, simple_match;
  logic [H1-1:0] simple_hid1;
  logic [K-1:0] range_match;
  logic [H1-1:0] range_hid1 [K];

  header_engine #(.KEY_BYTES(KB), .N_ENTRIES(NE), .HID2_W(HW), .RL_DEPTH(RD), .IDX_W(IW),
                  .HID1_W(H1), .K_RANGES(K), .FIFO_DEPTH(FD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results: cycle and rule bit set (bit r = rule r)
  int      exp_cyc [$];
  bit [5:0] exp_set [$];
  int n_multi = 0, n_simple = 0, n_range = 0, n_none = 0, n_results = 0;

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
    ic_wr_range_hid1[0] = H1'(r0); ic_wr_range_hid1[1] = H1'(r1); ic_wr_simple_hid1 = H1'(s);
    @(negedge clk);
    ic_wr_en = 0;
  endtask

  task automatic rl_write(int sel, int a, int sl, int sh, int dl, int dh);
    @(negedge clk);
    rl_wr_en = 1; rl_wr_sel = 2'(sel); rl_wr_addr = IW'(a);
    rl_wr_range = '{sl: 16'(sl), sh: 16'(sh), dl: 16'(dl), dh: 16'(dh)};
    @(negedge clk);
    rl_wr_en = 0;
  endtask

  function automatic bit ext(header_t h);  return h.src_ip[31:24] == 8'd10; endfunction
  function automatic bit home(header_t h); return h.dst_ip[31:16] == 16'hC0A8; endfunction

  // Rule semantics straight from the rule list.
  function automatic bit [5:0] expected(header_t h);
    bit [5:0] r;
    bit falls_through;
    r = '0;
    r[1] = ext(h) && home(h) && h.src_port == 110 && h.dst_port == 23 && h.proto == ICMP;
    r[3] = ext(h) && h.proto == TCP && h.src_port >= 4096 && h.src_port <= 8000 && h.dst_port == 80;
    r[4] = ext(h) && h.proto == TCP && h.src_port >= 80 && h.src_port <= 4000;
    r[5] = ext(h) && h.proto == TCP && h.src_port >= 80;
    // rule 2 is listed only with the entry reached when the more specific
    // TCP entries (sport 0x1*** with dport 80, sport 0x0***) do not apply
    falls_through = !(h.src_port[15:12] == 4'h1 && h.dst_port == 80) && h.src_port[15:12] != 4'h0;
    r[2] = ext(h) && h.proto == TCP && falls_through;
    return r;
  endfunction

  function automatic logic [15:0] pick_port(bit src);
    int sv [12] = '{110, 79, 80, 81, 4000, 4001, 4095, 4096, 8000, 8001, 65535, 0};
    int dv [4]  = '{23, 80, 81, 0};
    if ($urandom % 5 == 0) return 16'($urandom);
    return src ? 16'(sv[$urandom % 12]) : 16'(dv[$urandom % 4]);
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      bit [5:0] got;
      bit [5:0] e;
      int ec;
      got = '0;
      if (simple_match) got[simple_hid1] = 1;
      for (int i = 0; i < K; i++) if (range_match[i]) got[range_hid1[i]] = 1;
      checks++;
      if (exp_cyc.size() == 0) begin
        failures++; $display("FAIL unexpected result at %0d", cyc);
      end else begin
        ec = exp_cyc.pop_front(); e = exp_set.pop_front();
        if (ec != cyc || got != e) begin
          failures++; $display("FAIL at %0d (exp %0d): got %b exp %b", cyc, ec, got, e);
        end
        n_results++;
        if ($countones(got) > 1) n_multi++;
        if (simple_match) n_simple++;
        if (range_match != 0) n_range++;
        if (got == 0) n_none++;
      end
    end
  end

  initial begin
    header_t v, m;
    for (int i = 0; i < K; i++) ic_wr_range_hid1[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- header TCAM (Table B) ----
    v = '{src_ip: 32'h0A000000, dst_ip: 32'hC0A80000, src_port: 16'h006E, dst_port: 16'h0017, proto: ICMP};
    m = '{src_ip: 32'hFF000000, dst_ip: 32'hFFFF0000, src_port: 16'hFFFF, dst_port: 16'hFFFF, proto: 8'hFF};
    tc_write(0, v, m);
    v = '{src_ip: 32'h0A000000, dst_ip: 0, src_port: 16'h1000, dst_port: 16'h0050, proto: TCP};
    m = '{src_ip: 32'hFF000000, dst_ip: 0, src_port: 16'hF000, dst_port: 16'hFFFF, proto: 8'hFF};
    tc_write(1, v, m);
    v = '{src_ip: 32'h0A000000, dst_ip: 0, src_port: 16'h0000, dst_port: 0, proto: TCP};
    m = '{src_ip: 32'hFF000000, dst_ip: 0, src_port: 16'hF000, dst_port: 0, proto: 8'hFF};
    tc_write(2, v, m);
    v = '{src_ip: 32'h0A000000, dst_ip: 0, src_port: 0, dst_port: 0, proto: TCP};
    m = '{src_ip: 32'hFF000000, dst_ip: 0, src_port: 0, dst_port: 0, proto: 8'hFF};
    tc_write(3, v, m);
    // ---- Index Control Logic (Table C) ----
    ic_write(0, 0, 0, 0, 1);
    ic_write(1, 1, 3, 5, 0);
    ic_write(2, 2, 4, 5, 0);
    ic_write(3, 3, 5, 0, 2);
    // ---- Range List sub-tables (Tables D1, D2); row 0 unused ----
    rl_write(0, 0, 65535, 0, 65535, 0);
    rl_write(0, 1, 4096, 8000, 0, 65535);
    rl_write(0, 2, 80, 4000, 0, 65535);
    rl_write(0, 3, 80, 65535, 0, 65535);
    rl_write(1, 0, 65535, 0, 65535, 0);
    rl_write(1, 1, 80, 65535, 0, 65535);
    rl_write(1, 2, 80, 65535, 0, 65535);
    rl_write(1, 3, 65535, 0, 65535, 0);
    repeat (LAT + 2) @(negedge clk);

    // ---- traffic ----
    for (int n = 0; n < 3000; n++) begin
      header_t h;
      bit push;
      push = ($urandom % 4) != 0;
      h.src_ip   = ($urandom % 4 != 0) ? {8'd10, 24'($urandom)} : $urandom;
      h.dst_ip   = ($urandom % 2 != 0) ? {16'hC0A8, 16'($urandom)} : $urandom;
      h.src_port = pick_port(1);
      h.dst_port = pick_port(0);
      case ($urandom % 4)
        0: h.proto = ICMP;
        1: h.proto = UDP;
        default: h.proto = TCP;
      endcase
      if (h.proto == ICMP && $urandom % 2 == 0) begin h.src_port = 110; h.dst_port = 23; end
      hdr_push = push; hdr_in = h;
      if (push) begin exp_cyc.push_back(cyc + 1 + LAT); exp_set.push_back(expected(h)); end
      @(negedge clk);
      checks++;
      if (hdr_overflow || hdr_full) begin failures++; $display("FAIL queue filled at one header per clock"); end
    end
    hdr_push = 0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (exp_cyc.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_cyc.size()); end
    checks++;
    if (n_multi == 0 || n_simple == 0 || n_range == 0 || n_none == 0) begin
      failures++; $display("FAIL mechanism not exercised");
    end
    $display("results=%0d multiple=%0d simple=%0d range=%0d none=%0d", n_results, n_multi, n_simple, n_range, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
