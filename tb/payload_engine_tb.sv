// payload_engine_tb: end-to-end test of the cascade-TCAM payload engine.
//
// Reduced configuration L1 = 4 bytes, TCAM_1 16 entries (A = 5 bits), 3
// pieces per long pattern, TCAM_2 8 entries, loaded with the worked example
// of the cascade scheme:
//   TCAM_1  0 "ABCD" (P11)  1 "EFGH" (P21)  2 "IJKL" (P22, also a short
//           pattern)  3 "EFG*" (P12)  4 "AB**" (P23)  5 "XYZ*" (short)
//           6 "Q***" (short)
//   TCAM_2  {P11,P12,*} and {P11,P21,*} -> long pattern 1 = "ABCDEFG"
//           {P21,P22,P23} and {P21,P22,P11} -> long pattern 2 = "EFGHIJKLAB"
// The second entry of each pair is needed because of true inclusion:
// "EFGH" hides "EFG*" and "ABCD" hides "AB**".
// A random stream over the letters of the patterns, with the patterns
// planted in it and random idle cycles, is fed in.  The expected reports are
// found by plain string search over the stream, independently of the
// TCAMs, and every report is checked for CID and exact clock: a short
// pattern 2 clocks after the byte that completes its window, a long pattern
// 4 clocks after the byte that lies (N_PIECES-1)*L1 stream bytes after the
// one that completes its first piece.  Missing and extra reports are
// failures, and each mechanism (short report, long report, both true
// inclusion paths, idle cycles) must have occurred.
module payload_engine_tb;
  localparam int unsigned L1 = 4, N1 = 16, AW = 5, NP = 3, N2 = 8, N2W = 3, CW = 3;
  localparam int unsigned SHORT_LAT = 2, LONG_LAT = 4;
  localparam int unsigned NBYTES = 3000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_byte = 0;
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

  payload_engine #(.L1_BYTES(L1), .N1(N1), .A_W(AW), .N_PIECES(NP), .N2(N2),
                   .N2_W(N2W), .CID_W(CW)) dut (.*);

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

  byte stream [NBYTES];
  int  byte_cycle [NBYTES];
  int  exp_short [int];   // clock -> CID
  int  exp_long  [int];
  int  n_short = 0, n_long = 0, n_incl_p1 = 0, n_incl_p2 = 0, n_idle = 0;

  task automatic t1_write(int a, logic [8*L1-1:0] v, logic [8*L1-1:0] m, logic s);
    @(negedge clk);
    t1_wr_en = 1; t1_wr_addr = AW'(a); t1_wr_value = v; t1_wr_mask = m;
    t1_wr_valid = 1; t1_wr_short = s;
    @(negedge clk);
    t1_wr_en = 0;
  endtask

  task automatic t2_write(int a, int p0, int p1, int p2, int cid);
    logic [NP*AW-1:0] v, m;
    int p [NP];
    p[0] = p0; p[1] = p1; p[2] = p2;
    for (int j = 0; j < NP; j++) begin
      v[(NP-1-j)*AW +: AW] = (p[j] < 0) ? '0 : AW'(p[j]);
      m[(NP-1-j)*AW +: AW] = (p[j] < 0) ? '0 : '1;
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

  task automatic plant(int s, string pat);
    for (int i = 0; i < pat.len() && s + i < NBYTES - 16; i++) stream[s+i] = byte'(pat[i]);
  endtask

  // monitor
  always @(negedge clk) if (rst_n) begin
    if (short_valid) begin
      checks++;
      if (!exp_short.exists(cyc) || exp_short[cyc] != int'(short_cid)) begin
        failures++; $display("FAIL unexpected short cid=%0d at %0d", short_cid, cyc);
      end else begin
        exp_short.delete(cyc); n_short++;
      end
    end
    if (long_valid) begin
      checks++;
      if (!exp_long.exists(cyc) || exp_long[cyc] != int'(long_cid)) begin
        failures++; $display("FAIL unexpected long cid=%0d at %0d", long_cid, cyc);
      end else begin
        exp_long.delete(cyc); n_long++;
      end
    end
  end

  string alphabet = "ABCDEFGHIJKLQXYZ";
  string plants [7] = '{"ABCDEFG", "ABCDEFGH", "EFGHIJKLAB", "EFGHIJKLABCD", "XYZ", "Q", "IJKL"};

  initial begin
    bit gap [NBYTES*2];
    int c, t;
    // ---- stream and idle pattern ----
    for (int i = 0; i < NBYTES; i++) stream[i] = byte'(alphabet[$urandom % alphabet.len()]);
    for (int i = 0; i < NBYTES - 40; i += 12 + $urandom % 20) plant(i, plants[$urandom % 7]);
    for (int i = NBYTES - 16; i < NBYTES; i++) stream[i] = 0;
    for (int i = 0; i < NBYTES*2; i++) gap[i] = ($urandom % 6) == 0;

    // ---- load tables ----
    repeat (2) @(posedge clk);
    rst_n = 1;
    t1_write(0, "ABCD", 32'hFFFFFFFF, 0);
    t1_write(1, "EFGH", 32'hFFFFFFFF, 0);
    t1_write(2, "IJKL", 32'hFFFFFFFF, 1);
    t1_write(3, {"EFG", 8'h00}, 32'hFFFFFF00, 0);
    t1_write(4, {"AB", 16'h0000}, 32'hFFFF0000, 0);
    t1_write(5, {"XYZ", 8'h00}, 32'hFFFFFF00, 1);
    t1_write(6, {"Q", 24'h0}, 32'hFF000000, 1);
    t2_write(0, 0, 3, -1, 1);
    t2_write(1, 0, 1, -1, 1);
    t2_write(2, 1, 2, 4, 2);
    t2_write(3, 1, 2, 0, 2);

    // ---- clock of each byte (sampled at posedge number cyc+1 when driven
    //      at the negedge in which cyc is read) ----
    @(negedge clk);
    c = cyc + 1; t = 0;
    for (int k = 0; t < NBYTES; k++) begin
      if (gap[k]) begin c++; continue; end
      byte_cycle[t] = c; t++; c++;
    end

    // ---- expected reports by string search ----
    for (int s = 0; s + L1 - 1 < NBYTES; s++) begin
      automatic int done1 = byte_cycle[s + L1 - 1];
      if (at(s, "XYZ"))  exp_short[done1 + SHORT_LAT] = 5;
      if (at(s, "Q"))    exp_short[done1 + SHORT_LAT] = 6;
      if (at(s, "IJKL")) exp_short[done1 + SHORT_LAT] = 2;
      if (s + L1 - 1 + (NP-1)*L1 < NBYTES) begin
        automatic int donel = byte_cycle[s + L1 - 1 + (NP-1)*L1];
        if (at(s, "ABCDEFG"))    begin exp_long[donel + LONG_LAT] = 1;
                                       if (at(s, "ABCDEFGH")) n_incl_p1++; end
        if (at(s, "EFGHIJKLAB")) begin exp_long[donel + LONG_LAT] = 2;
                                       if (at(s, "EFGHIJKLABCD")) n_incl_p2++; end
      end
    end

    $display("expected short=%0d long=%0d at %0t", exp_short.num(), exp_long.num(), $time);
    // ---- drive ----
    t = 0;
    for (int k = 0; t < NBYTES; k++) begin
      if (gap[k]) begin in_valid = 0; n_idle++; end
      else begin in_valid = 1; in_byte = stream[t]; t++; end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LONG_LAT + 4) @(negedge clk);

    checks++;
    if (exp_short.num() != 0 || exp_long.num() != 0) begin
      failures++;
      $display("FAIL missed reports: short %0d long %0d", exp_short.num(), exp_long.num());
    end
    checks++;
    if (n_short == 0 || n_long == 0 || n_incl_p1 == 0 || n_incl_p2 == 0 || n_idle == 0) begin
      failures++; $display("FAIL mechanism not exercised");
    end
    $display("short=%0d long=%0d inclusion_p1=%0d inclusion_p2=%0d idle=%0d",
             n_short, n_long, n_incl_p1, n_incl_p2, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
