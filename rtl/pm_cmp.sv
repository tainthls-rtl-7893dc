// pm_cmp: taint propagation module of the unsigned comparator (taint library).
//
// The tag of a comparison result is one bit: it is set when the tainted input
// bits can change the outcome. For bit and byte tags each operand is bounded by
// its smallest value (tainted bits 0) and largest value (tainted bits 1):
//   EQ/NE  : tainted when the untainted bits agree and some bit is tainted;
//   LTU/GEU: tainted when a < b can come out both true and false,
//            i.e. min(a) < max(b) and max(a) >= min(b).
// For variable tags the result tag is the OR of the two tags. The controller
// receives this tag with the branch condition (security check). Rules are this
// design's own. Combinational.
module pm_cmp
  import dift_pkg::*;
#(
  parameter gran_e       GRAN = GRAN_BIT,
  parameter int unsigned W    = 32,
  localparam int unsigned TW  = tag_width(GRAN, W)
) (
  input  cmp_op_e       op,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [TW-1:0] at,
  input  logic [TW-1:0] bt,
  output logic          yt
);
  if (GRAN == GRAN_VAR) begin : g_var
    assign yt = (|at) | (|bt);
  end else begin : g_rng
    logic [W-1:0] am, bm;
    tag_expand #(.GRAN(GRAN), .W(W)) u_ea (.tag(at), .mask(am));
    tag_expand #(.GRAN(GRAN), .W(W)) u_eb (.tag(bt), .mask(bm));
    always_comb begin
      logic can_t, can_f;
      case (op)
        COP_EQ, COP_NE: yt = (((a ^ b) & ~(am | bm)) == '0) && ((am | bm) != '0);
        default: begin
          can_t = (a & ~am) < (b | bm);
          can_f = (a | am) >= (b & ~bm);
          yt    = can_t && can_f;
        end
      endcase
    end
  end
endmodule
