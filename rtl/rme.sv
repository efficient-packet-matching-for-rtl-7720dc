// rme: Range Matching Engine.
//
// Four 16-bit magnitude comparators check a packet's ports against one range
// couple read from the Range List: SL <= source port <= SH and
// DL <= destination port <= DH.  Y is 1 only when all four hold.  Purely
// combinational; the header engine registers Y in the result mask.  The four
// comparators and the single Y output follow the published scheme; inclusive bounds
// are this design's reading of ranges written as [low, high].
module rme
  import nids_pkg::*;
(
  input  port_range_t range_i,
  input  logic [15:0] src_port,
  input  logic [15:0] dst_port,
  output logic        y
);

  logic src_ge_low, src_le_high, dst_ge_low, dst_le_high;

  always_comb begin
    src_ge_low  = (src_port >= range_i.sl);
    src_le_high = (src_port <= range_i.sh);
    dst_ge_low  = (dst_port >= range_i.dl);
    dst_le_high = (dst_port <= range_i.dh);
    y = src_ge_low && src_le_high && dst_ge_low && dst_le_high;
  end

endmodule
