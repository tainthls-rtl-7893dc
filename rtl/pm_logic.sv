// pm_logic: taint propagation module of the bitwise AND/OR/XOR unit (taint library).
//
//   GRAN_BIT : gate-level precise rules. AND: an output bit is tainted when a
//              tainted input bit meets an untainted 1 or another tainted bit (a
//              known 0 forces the output). OR: the same with a known 1 forcing
//              the output. XOR: OR of the tags. These rules mark exactly the
//              output bits that the tainted inputs can change.
//   GRAN_BYTE, GRAN_VAR: OR of the tags, group by group.
// The rules are this design's choice of library content; the document names
// gate-level tracking as one source of such modules and says OR gates suffice
// at variable level. Combinational.
module pm_logic
  import dift_pkg::*;
#(
  parameter gran_e       GRAN = GRAN_BIT,
  parameter int unsigned W    = 32,
  localparam int unsigned TW  = tag_width(GRAN, W)
) (
  input  logic_op_e     op,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [TW-1:0] at,
  input  logic [TW-1:0] bt,
  output logic [TW-1:0] yt
);
  if (GRAN == GRAN_BIT) begin : g_bit
    always_comb begin
      case (op)
        LOP_AND: yt = (at & bt) | (at & b & ~bt) | (bt & a & ~at);
        LOP_OR:  yt = (at & bt) | (at & ~b & ~bt) | (bt & ~a & ~at);
        default: yt = at | bt;
      endcase
    end
  end else begin : g_grp
    assign yt = at | bt;
  end
endmodule
