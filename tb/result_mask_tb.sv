// result_mask_tb: self-checking test of the Multiple Results Mask.
//
// Drives random Y masks, Range HID1 slots (some empty, HID1 = 0), Simple
// HID1 values and valid/hit flags, and checks one clock later that exactly
// the slots with Y = 1 and a rule are reported, that the Simple HID1 passes
// through on a hit, and that nothing is reported without valid and hit.
module result_mask_tb;
  localparam int unsigned H1 = 9, K = 4;

  logic clk = 0, rst_n = 0, in_valid = 0, in_hit = 0;
  logic [K-1:0] y = '0;
  logic [H1-1:0] range_hid1 [K];
  logic [H1-1:0] simple_hid1 = '0;
  logic out_valid, simple_match;
  logic [K-1:0] range_match;
  logic [H1-1:0] range_hid1_out [K];
  logic [H1-1:0] simple_hid1_out;

  result_mask #(.HID1_W(H1), .K_RANGES(K)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < K; i++) range_hid1[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      logic v, h; logic [K-1:0] yy; logic [H1-1:0] rh [K]; logic [H1-1:0] s;
      logic bad;
      v = ($urandom % 5) != 0; h = ($urandom % 4) != 0; yy = K'($urandom);
      for (int i = 0; i < K; i++) rh[i] = ($urandom % 3 == 0) ? '0 : H1'($urandom);
      s = ($urandom % 2) ? '0 : H1'($urandom);
      in_valid <= v; in_hit <= h; y <= yy; simple_hid1 <= s;
      for (int i = 0; i < K; i++) range_hid1[i] <= rh[i];
      @(posedge clk);
      #1;
      checks++;
      bad = (out_valid !== v) || (simple_match !== (v && h && s != 0)) ||
            (v && h && simple_hid1_out !== s);
      for (int i = 0; i < K; i++) begin
        if (range_match[i] !== (v && h && yy[i] && rh[i] != 0)) bad = 1;
        if (range_match[i] && range_hid1_out[i] !== rh[i]) bad = 1;
      end
      if (bad) begin failures++; $display("FAIL n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
