// tcam_tb: self-checking test of the first-match ternary CAM.
//
// Loads a small TCAM (16-bit entries, 8 deep) with random values and masks
// including overlapping entries, then searches random keys and keys built to
// hit chosen entries.  A reference model in the testbench scans the same
// entries lowest index first; hit, hit_index and out_valid are checked one
// clock after each search (the stated latency).  Also checks that an
// invalidated entry stops matching and that search_en low gives no result.
module tcam_tb;
  localparam int unsigned W = 16, D = 8, IW = 3;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_valid = 0, search_en = 0;
  logic [IW-1:0] wr_addr = '0;
  logic [W-1:0] wr_value = '0, wr_mask = '0, key = '0;
  logic out_valid, hit;
  logic [IW-1:0] hit_index;

  tcam #(.WIDTH(W), .DEPTH(D), .INDEX_W(IW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] mv [D], mm [D];
  logic         mvalid [D];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_entry(int a, logic [W-1:0] v, logic [W-1:0] m, logic val);
    @(negedge clk);
    wr_en = 1; wr_addr = IW'(a); wr_value = v; wr_mask = m; wr_valid = val;
    @(negedge clk);
    wr_en = 0;
    mv[a] = v; mm[a] = m; mvalid[a] = val;
  endtask

  task automatic search(logic [W-1:0] k);
    logic exp_hit; int exp_idx;
    exp_hit = 0; exp_idx = 0;
    for (int i = 0; i < D; i++)
      if (!exp_hit && mvalid[i] && (((k ^ mv[i]) & mm[i]) == '0)) begin exp_hit = 1; exp_idx = i; end
    @(negedge clk);
    search_en = 1; key = k;
    @(negedge clk);
    search_en = 0;
    checks++;
    if (!out_valid || hit !== exp_hit || (exp_hit && hit_index != IW'(exp_idx))) begin
      failures++;
      $display("FAIL key=%h hit=%0b idx=%0d exp %0b/%0d", k, hit, hit_index, exp_hit, exp_idx);
    end
  endtask

  initial begin
    for (int i = 0; i < D; i++) begin mvalid[i] = 0; mv[i] = 0; mm[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // nothing valid yet
    search(16'h1234);
    // overlapping entries: exact, prefix, wildcard-all (lowest index wins)
    write_entry(0, 16'hABCD, 16'hFFFF, 1);
    write_entry(1, 16'hAB00, 16'hFF00, 1);
    write_entry(2, 16'h0000, 16'h0000, 1);
    search(16'hABCD); search(16'hAB12); search(16'h5555);
    // invalidate entry 0: ABCD now falls to entry 1
    write_entry(0, 16'hABCD, 16'hFFFF, 0);
    search(16'hABCD);
    for (int i = 0; i < D; i++)
      write_entry(i, 16'($urandom), (i % 2 == 1) ? (16'($urandom) & 16'($urandom) & 16'($urandom)) : (16'($urandom) | 16'($urandom)), ($urandom % 4) != 0);
    for (int n = 0; n < 300; n++) begin
      logic [W-1:0] k;
      int t;
      t = $urandom % D;
      k = (n % 2 == 1) ? 16'($urandom) : ((mv[t] & mm[t]) | (16'($urandom) & ~mm[t]));
      search(k);
    end
    // search_en low: no result
    @(negedge clk);
    checks++;
    if (out_valid || hit) begin failures++; $display("FAIL idle result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
