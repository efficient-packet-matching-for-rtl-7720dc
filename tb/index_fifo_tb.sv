// index_fifo_tb: self-checking test of the TCAM_2 index FIFO.
//
// Small configuration: 4-bit words, L1 = 3, 3 pieces, so the FIFO is
// (3-1)*3+1 = 7 words deep and the key is {A_1, A_4, A_7}.  Random words are
// shifted in with random gaps and the key is compared with a model history
// every clock.  After reset the key must be all invalid (all ones).
module index_fifo_tb;
  localparam int unsigned AW = 4, L = 3, NP = 3, DEPTH = (NP-1)*L+1;

  logic clk = 0, rst_n = 0, shift_en = 0;
  logic [AW-1:0] in_index = '0;
  logic [NP*AW-1:0] key;

  index_fifo #(.A_W(AW), .L1_BYTES(L), .N_PIECES(NP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // hist[0] newest ... hist[DEPTH-1] oldest (= A_1)
  logic [AW-1:0] hist [DEPTH];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NP*AW-1:0] model_key();
    logic [NP*AW-1:0] k;
    // field j (most significant first) = A_{1+j*L} = hist[DEPTH-1-j*L]
    for (int j = 0; j < NP; j++) k[(NP-1-j)*AW +: AW] = hist[DEPTH-1-j*L];
    return k;
  endfunction

  initial begin
    for (int i = 0; i < DEPTH; i++) hist[i] = '1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    #1;
    checks++;
    if (key !== '1) begin failures++; $display("FAIL reset key=%h", key); end
    for (int n = 0; n < 400; n++) begin
      logic s; logic [AW-1:0] w;
      s = ($urandom % 5) != 0; w = AW'($urandom);
      shift_en <= s; in_index <= w;
      @(posedge clk);
      if (s) begin
        for (int i = DEPTH-1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = w;
      end
      #1;
      checks++;
      if (key !== model_key()) begin
        failures++; $display("FAIL n=%0d key=%h exp=%h", n, key, model_key());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
