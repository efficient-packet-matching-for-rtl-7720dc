// true_value_table_tb: self-checking test of the short-pattern flag table.
//
// Writes random flags into a 64-entry table, reads every address back
// (result one clock after the request) and checks rd_flag against a model;
// also checks that rd_en low reads 0 and that reset clears the table.
module true_value_table_tb;
  localparam int unsigned D = 64, IW = 6;

  logic clk = 0, rst_n = 0, wr_en = 0, wr_flag = 0, rd_en = 0;
  logic [IW-1:0] wr_addr = '0, rd_addr = '0;
  logic rd_flag;

  true_value_table #(.DEPTH(D), .INDEX_W(IW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic model [D];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int a, logic en);
    @(negedge clk);
    rd_en = en; rd_addr = IW'(a);
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (rd_flag !== (en && model[a])) begin
      failures++; $display("FAIL addr=%0d flag=%0b exp=%0b", a, rd_flag, en && model[a]);
    end
  endtask

  initial begin
    for (int i = 0; i < D; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < D; i++) read_check(i, 1);
    for (int n = 0; n < 200; n++) begin
      int a; logic f;
      a = $urandom % D; f = 1'($urandom);
      @(negedge clk);
      wr_en = 1; wr_addr = IW'(a); wr_flag = f;
      @(negedge clk);
      wr_en = 0;
      model[a] = f;
    end
    for (int i = 0; i < D; i++) read_check(i, 1);
    for (int i = 0; i < 8; i++) read_check(i, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
