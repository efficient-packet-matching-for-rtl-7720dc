// header_fifo_tb: self-checking test of the packet header queue.
//
// Pushes and pops random headers into a 4-deep FIFO with random push/pop
// patterns, compares every popped head with a queue model, and checks
// empty, full and the overflow pulse when a push meets a full queue.
module header_fifo_tb;
  import nids_pkg::*;
  localparam int unsigned D = 4;

  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  header_t wr_header = '0, rd_header;
  logic empty, full, overflow;

  header_fifo #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, overflows = 0;
  header_t q [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    checks++;
    if (!empty || full) begin failures++; $display("FAIL after reset"); end
    for (int n = 0; n < 1000; n++) begin
      logic pu, po, exp_ovf; header_t h;
      pu = ($urandom % 100) < (n < 500 ? 70 : 30);
      po = ($urandom % 2) == 0;
      h = {$urandom, $urandom, $urandom, $urandom};
      // check combinational status and head before the edge
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D) ||
          (q.size() != 0 && rd_header !== q[0])) begin
        failures++; $display("FAIL n=%0d status empty=%0b full=%0b size=%0d", n, empty, full, q.size());
      end
      exp_ovf = pu && (q.size() == D);
      push <= pu; pop <= po; wr_header <= h;
      @(posedge clk);
      if (po && q.size() != 0) void'(q.pop_front());
      if (pu && !exp_ovf) q.push_back(h);
      #1;
      checks++;
      if (overflow !== exp_ovf) begin failures++; $display("FAIL n=%0d overflow", n); end
      if (exp_ovf) overflows++;
    end
    push <= 0; pop <= 0;
    checks++;
    if (overflows == 0) begin failures++; $display("FAIL overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
