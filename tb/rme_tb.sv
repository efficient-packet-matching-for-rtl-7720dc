// rme_tb: self-checking test of the Range Matching Engine.
//
// Applies the bounds themselves, values just outside them, the invalid
// couple, random couples and ports, and random couples probed exactly at
// their four corners, and checks Y against
// SL <= sport <= SH && DL <= dport <= DH computed in the testbench.
module rme_tb;
  import nids_pkg::*;

  port_range_t range_i;
  logic [15:0] src_port, dst_port;
  logic y;

  rme dut (.*);

  int checks = 0, failures = 0;

  task automatic try(port_range_t r, int sp, int dp);
    logic exp;
    range_i = r; src_port = 16'(sp); dst_port = 16'(dp);
    #1;
    exp = (int'(r.sl) <= sp) && (sp <= int'(r.sh)) && (int'(r.dl) <= dp) && (dp <= int'(r.dh));
    checks++;
    if (y !== exp) begin
      failures++; $display("FAIL r=%h sp=%0d dp=%0d y=%0b", r, sp, dp, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    port_range_t r;
    r = '{sl: 4096, sh: 8000, dl: 80, dh: 80};
    try(r, 4096, 80); try(r, 8000, 80); try(r, 4095, 80); try(r, 8001, 80);
    try(r, 5000, 79); try(r, 5000, 81); try(r, 5000, 80);
    try(RANGE_INVALID, 0, 0); try(RANGE_INVALID, 65535, 65535);
    for (int n = 0; n < 2000; n++) begin
      int a, b, c, d;
      a = $urandom % 65536; b = $urandom % 65536; c = $urandom % 65536; d = $urandom % 65536;
      r = '{sl: 16'(a < b ? a : b), sh: 16'(a < b ? b : a), dl: 16'(c < d ? c : d), dh: 16'(c < d ? d : c)};
      try(r, (n % 3 == 0) ? $urandom % 65536 : int'(r.sl) + $urandom % (int'(r.sh) - int'(r.sl) + 1),
             (n % 3 == 1) ? $urandom % 65536 : int'(r.dl) + $urandom % (int'(r.dh) - int'(r.dl) + 1));
    end
    // Every bound exactly, with the other port inside its range.
    for (int n = 0; n < 500; n++) begin
      int a, b, c, d;
      a = $urandom % 65536; b = $urandom % 65536; c = $urandom % 65536; d = $urandom % 65536;
      r = '{sl: 16'(a < b ? a : b), sh: 16'(a < b ? b : a), dl: 16'(c < d ? c : d), dh: 16'(c < d ? d : c)};
      try(r, int'(r.sl), int'(r.dl)); try(r, int'(r.sh), int'(r.dh));
      try(r, int'(r.sl), int'(r.dh)); try(r, int'(r.sh), int'(r.dl));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
