// index_fifo: the FIFO of the back TCAM (TCAM_2).
//
// Each search of TCAM_1 pushes one A-bit word: the matching TCAM_1 index, or
// the reserved invalid code when TCAM_1 found nothing.  The FIFO is
// (N_PIECES-1)*L1_BYTES+1 words deep.  Numbering the words A_1 (oldest) to
// A_DEPTH (newest), the TCAM_2 key is the N_PIECES words A_1, A_1+L1,
// A_1+2*L1, ..., A_1+(N_PIECES-1)*L1: the TCAM_1 results of N_PIECES windows
// that are exactly L1 bytes apart, i.e. of consecutive pieces of one long
// pattern.  The word at A_1 goes into the most significant field of the key,
// so a TCAM_2 entry lists the piece indexes of a long pattern in order, first
// piece first, with unused trailing fields left "do not care".
//
// Interface and timing: shift_en/in_index shift one word in per clock; key
// is taken straight from the registers, so it reflects a push from the next
// clock on.  After reset every word holds the invalid code (all ones).  The
// depth, the taps and the invalid word follow the published scheme; the value of the
// invalid code (all ones, which needs TCAM_1 to have fewer than 2**A_W
// entries) is this design's choice.
module index_fifo #(
  parameter int unsigned A_W      = 12,
  parameter int unsigned L1_BYTES = 16,
  parameter int unsigned N_PIECES = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    shift_en,
  input  logic [A_W-1:0]          in_index,
  output logic [N_PIECES*A_W-1:0] key
);

  localparam int unsigned DEPTH = (N_PIECES - 1) * L1_BYTES + 1;

  // words_q[1] is A_1 (oldest), words_q[DEPTH] is the newest word.
  logic [A_W-1:0] words_q [1:DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 1; i <= DEPTH; i++) words_q[i] <= '1;
    end else if (shift_en) begin
      for (int unsigned i = 1; i < DEPTH; i++) words_q[i] <= words_q[i+1];
      words_q[DEPTH] <= in_index;
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < N_PIECES; j++) begin
      key[(N_PIECES-1-j)*A_W +: A_W] = words_q[1 + j*L1_BYTES];
    end
  end

endmodule
