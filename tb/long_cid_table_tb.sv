// long_cid_table_tb: self-checking test of the TCAM_2 result memory.
//
// Writes random CIDs into a 16-entry table, including several entries with
// the same CID, reads them back one clock after each request and checks
// rd_valid and rd_cid against a model.
module long_cid_table_tb;
  localparam int unsigned D = 16, IW = 4, CW = 6;

  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [IW-1:0] wr_addr = '0, rd_addr = '0;
  logic [CW-1:0] wr_cid = '0;
  logic rd_valid;
  logic [CW-1:0] rd_cid;

  long_cid_table #(.DEPTH(D), .INDEX_W(IW), .CID_W(CW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [CW-1:0] model [D];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < D; i++) begin
      model[i] = CW'(i < 4 ? 7 : $urandom);
      wr_en <= 1; wr_addr <= IW'(i); wr_cid <= model[i];
      @(posedge clk);
    end
    wr_en <= 0;
    for (int n = 0; n < 100; n++) begin
      int a; logic e;
      a = $urandom % D; e = ($urandom % 4) != 0;
      rd_en <= e; rd_addr <= IW'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rd_valid !== e || (e && rd_cid !== model[a])) begin
        failures++; $display("FAIL addr=%0d v=%0b cid=%0d exp=%0d", a, rd_valid, rd_cid, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
