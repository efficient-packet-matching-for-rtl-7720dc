// range_list_bram_tb: self-checking test of one Range List sub-table.
//
// Loads sub-table D1 of the worked example (Index 1: [4096,8000]/[0,65535],
// Index 2: [80,4000]/[0,65535], Index 3: [80,65535]/[0,65535]) plus random
// rows, reads rows back one clock after each request and checks them; a
// read with rd_en low must give the invalid couple.
module range_list_bram_tb;
  import nids_pkg::*;
  localparam int unsigned D = 16, IW = 4;

  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [IW-1:0] wr_addr = '0, rd_addr = '0;
  port_range_t wr_range = '0, rd_range;

  range_list_bram #(.DEPTH(D), .IDX_W(IW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  port_range_t model [D];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int a, port_range_t r);
    model[a] = r;
    @(negedge clk);
    wr_en = 1; wr_addr = IW'(a); wr_range = r;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    put(0, RANGE_INVALID);
    put(1, '{sl: 4096, sh: 8000, dl: 0, dh: 65535});
    put(2, '{sl: 80, sh: 4000, dl: 0, dh: 65535});
    put(3, '{sl: 80, sh: 65535, dl: 0, dh: 65535});
    for (int a = 4; a < D; a++) put(a, {$urandom, $urandom});
    for (int n = 0; n < 200; n++) begin
      int a; logic e;
      a = (n < 4) ? n : $urandom % D; e = (n < 4) || (($urandom % 5) != 0);
      @(negedge clk);
      rd_en = e; rd_addr = IW'(a);
      @(negedge clk);
      checks++;
      if (rd_range !== (e ? model[a] : RANGE_INVALID)) begin
        failures++; $display("FAIL addr=%0d got %h", a, rd_range);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
