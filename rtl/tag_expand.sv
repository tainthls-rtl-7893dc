// tag_expand: spreads a taint tag over the data bits it covers.
// Bit i of the mask is the tag bit of the group holding data bit i (groups are
// single bits, bytes or the whole word, see dift_pkg). Purely combinational.
module tag_expand
  import dift_pkg::*;
#(
  parameter gran_e       GRAN = GRAN_BIT,
  parameter int unsigned W    = 32,
  localparam int unsigned TW  = tag_width(GRAN, W)
) (
  input  logic [TW-1:0] tag,
  output logic [W-1:0]  mask
);
  localparam int unsigned G = group_size(GRAN, W);
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign mask[i] = tag[i / G];
  end
endmodule
