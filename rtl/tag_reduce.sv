// tag_reduce: folds a per-bit taint mask into a tag of the chosen granularity.
// A tag bit is set when any data bit of its group (bit, byte or word) is
// tainted. Purely combinational.
module tag_reduce
  import dift_pkg::*;
#(
  parameter gran_e       GRAN = GRAN_BIT,
  parameter int unsigned W    = 32,
  localparam int unsigned TW  = tag_width(GRAN, W)
) (
  input  logic [W-1:0]  mask,
  output logic [TW-1:0] tag
);
  localparam int unsigned G = group_size(GRAN, W);
  for (genvar j = 0; j < TW; j++) begin : g_grp
    localparam int unsigned LO = j * G;
    localparam int unsigned HI = (LO + G > W) ? W - 1 : LO + G - 1;
    assign tag[j] = |mask[HI:LO];
  end
endmodule
