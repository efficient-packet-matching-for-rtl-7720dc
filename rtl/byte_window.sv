// byte_window: the input FIFO of the front TCAM (TCAM_1).
//
// The payload stream enters one byte per clock.  The block keeps the last
// L1_BYTES bytes in a shift register and presents them as the TCAM_1 search
// key, oldest byte in the most significant position.  A pattern piece is
// written into TCAM_1 first byte first (most significant), so a piece of
// L1_BYTES bytes matches in the cycle its last byte has entered, and a
// shorter piece padded with "do not care" bytes matches once its first byte
// has become the oldest byte of the window.
//
// Interface and timing: in_valid/in_byte accepted on every clock edge where
// in_valid is 1; window and win_valid are registered and change one clock
// after the byte.  When in_valid is 0 the window holds (a stall) and
// win_valid is 0 so that no search is made for that cycle.  The window is
// all zero after reset.  One byte per clock and the L1 width follow the
// published scheme; the stall handling and the zero reset are this design's choice.
module byte_window #(
  parameter int unsigned L1_BYTES = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [7:0]              in_byte,
  output logic                    win_valid,
  output logic [8*L1_BYTES-1:0]   window
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      window    <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid;
      if (in_valid) begin
        window <= {window[8*L1_BYTES-9:0], in_byte};
      end
    end
  end

endmodule
