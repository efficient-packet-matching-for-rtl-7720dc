// index_control_tb: self-checking test of the Index Control Logic table.
//
// First loads the four entries of the worked example (HID2 1..4 stored at
// addresses 0..3): Index -,1,2,3; Range HID1 -, {3,5}, {4,5}, {5}; Simple
// HID1 1, -, -, 2 (0 stands for "none").  Then fills the rest of a 32-entry
// table with random entries and reads random addresses, checking every field
// one clock after the request.
module index_control_tb;
  localparam int unsigned D = 32, HW = 5, IW = 5, H1 = 9, K = 3;

  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [HW-1:0] wr_addr = '0, rd_addr = '0;
  logic [IW-1:0] wr_index = '0;
  logic [H1-1:0] wr_range_hid1 [K];
  logic [H1-1:0] wr_simple_hid1 = '0;
  logic rd_valid;
  logic [IW-1:0] rd_index;
  logic [H1-1:0] rd_range_hid1 [K];
  logic [H1-1:0] rd_simple_hid1;

  index_control #(.DEPTH(D), .HID2_W(HW), .IDX_W(IW), .HID1_W(H1), .K_RANGES(K)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [IW-1:0] m_index [D];
  logic [H1-1:0] m_range [D][K];
  logic [H1-1:0] m_simple [D];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int a, int idx, int r0, int r1, int r2, int s);
    m_index[a] = IW'(idx); m_range[a][0] = H1'(r0); m_range[a][1] = H1'(r1);
    m_range[a][2] = H1'(r2); m_simple[a] = H1'(s);
    @(negedge clk);
    wr_en = 1; wr_addr = HW'(a); wr_index = m_index[a];
    for (int i = 0; i < K; i++) wr_range_hid1[i] = m_range[a][i];
    wr_simple_hid1 = m_simple[a];
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic get(int a);
    logic bad;
    @(negedge clk);
    rd_en = 1; rd_addr = HW'(a);
    @(negedge clk);
    rd_en = 0;
    checks++;
    bad = !rd_valid || rd_index !== m_index[a] || rd_simple_hid1 !== m_simple[a];
    for (int i = 0; i < K; i++) if (rd_range_hid1[i] !== m_range[a][i]) bad = 1;
    if (bad) begin failures++; $display("FAIL addr=%0d index=%0d simple=%0d", a, rd_index, rd_simple_hid1); end
  endtask

  initial begin
    for (int i = 0; i < K; i++) wr_range_hid1[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    put(0, 0, 0, 0, 0, 1);
    put(1, 1, 3, 5, 0, 0);
    put(2, 2, 4, 5, 0, 0);
    put(3, 3, 5, 0, 0, 2);
    for (int a = 0; a < 4; a++) get(a);
    for (int a = 4; a < D; a++) put(a, $urandom, $urandom, $urandom, $urandom, $urandom);
    for (int n = 0; n < 200; n++) get($urandom % D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
