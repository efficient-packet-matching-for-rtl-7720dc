// result_mask: Multiple Results Mask of the header rules matching engine.
//
// The K RME outputs Y form a mask over the K "Range HID1" slots given by the
// Index Control Logic.  Slot i is reported as a matched range rule when Y_i
// is 1 and the slot holds a rule (HID1 not 0).  The Simple HID1 of the same
// TCAM entry is passed along so both kinds of result of one packet leave in
// the same clock.  All matched rules are reported together, one packet per
// clock.
//
// Interface and timing: inputs in cycle t, outputs registered at the end of
// cycle t.  in_valid marks a packet; in_hit marks that the header TCAM found
// an entry for it.  out_valid comes once per packet, matched or not.  The
// masking follows the published scheme; the output format (a valid bit per slot) is
// this design's choice.
module result_mask #(
  parameter int unsigned HID1_W   = 9,
  parameter int unsigned K_RANGES = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_hit,
  input  logic [K_RANGES-1:0] y,
  input  logic [HID1_W-1:0] range_hid1 [K_RANGES],
  input  logic [HID1_W-1:0] simple_hid1,
  output logic              out_valid,
  output logic [K_RANGES-1:0] range_match,
  output logic [HID1_W-1:0] range_hid1_out [K_RANGES],
  output logic              simple_match,
  output logic [HID1_W-1:0] simple_hid1_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid       <= 1'b0;
      range_match     <= '0;
      simple_match    <= 1'b0;
      simple_hid1_out <= '0;
      for (int unsigned i = 0; i < K_RANGES; i++) range_hid1_out[i] <= '0;
    end else begin
      out_valid    <= in_valid;
      simple_match <= in_valid && in_hit && (simple_hid1 != '0);
      simple_hid1_out <= (in_valid && in_hit) ? simple_hid1 : '0;
      for (int unsigned i = 0; i < K_RANGES; i++) begin
        range_match[i]    <= in_valid && in_hit && y[i] && (range_hid1[i] != '0);
        range_hid1_out[i] <= (in_valid && in_hit && y[i]) ? range_hid1[i] : '0;
      end
    end
  end

endmodule
