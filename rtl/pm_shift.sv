// pm_shift: taint propagation module of the logical shifter (taint library).
//
// y = a << b or a >> b, the amount taken from the low log2(W) bits of b.
// When the amount is untainted the tag of a moves with the data: bit tags
// shift directly, byte and variable tags are spread to bits, shifted and
// folded back. When any tag of b is set the amount is unknown and every
// result group is tainted. The rule is this design's own. Combinational.
module pm_shift
  import dift_pkg::*;
#(
  parameter gran_e       GRAN = GRAN_BIT,
  parameter int unsigned W    = 32,
  localparam int unsigned TW  = tag_width(GRAN, W)
) (
  input  shift_op_e     op,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [TW-1:0] at,
  input  logic [TW-1:0] bt,
  output logic [TW-1:0] yt
);
  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1;
  logic [W-1:0]  am, ym;
  logic [TW-1:0] yr;

  tag_expand #(.GRAN(GRAN), .W(W)) u_exp (.tag(at), .mask(am));

  always_comb begin
    if (op == SOP_SLL) ym = am << b[SW-1:0];
    else               ym = am >> b[SW-1:0];
  end

  tag_reduce #(.GRAN(GRAN), .W(W)) u_red (.mask(ym), .tag(yr));

  // The shifted value itself does not change the tag; a is used only by the
  // functional unit it shadows.
  logic unused;
  assign unused = ^a;

  assign yt = (|bt) ? '1 : yr;
endmodule
