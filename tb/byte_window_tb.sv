// byte_window_tb: self-checking test of the TCAM_1 byte window.
//
// Feeds random bytes with random gaps (in_valid low) into a 4-byte window
// and compares the window with a model of the last four accepted bytes,
// oldest in the most significant byte.  Checks that win_valid follows
// in_valid one clock later and that the window holds during a gap.
module byte_window_tb;
  localparam int unsigned L = 4;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] in_byte = 0;
  logic win_valid;
  logic [8*L-1:0] window;

  byte_window #(.L1_BYTES(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [8*L-1:0] model = '0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      logic v; logic [7:0] b;
      v = ($urandom % 4) != 0; b = 8'($urandom);
      in_valid <= v; in_byte <= b;
      @(posedge clk);
      if (v) model = {model[8*L-9:0], b};
      #1;
      checks++;
      if (win_valid !== v || window !== model) begin
        failures++;
        $display("FAIL n=%0d valid=%0b window=%h model=%h", n, win_valid, window, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
