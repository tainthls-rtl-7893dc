// pm_add: taint propagation module of an adder/subtractor (taint library).
//
// Computes the tag of y = a + b (sub = 0) or y = a - b (sub = 1) from the operand
// values and tags, concurrently with the functional unit it shadows.
//   GRAN_BIT : each operand is bounded by its smallest value (tainted bits 0) and
//              its largest (tainted bits 1); a result bit is tainted when it
//              differs between the two extreme sums, or when an operand bit in
//              the same position is tainted. Subtraction is a + ~b + 1, and ~b
//              carries b's tag. The rule is sound: every result bit that some
//              choice of the tainted input bits can change is marked.
//   GRAN_BYTE: a carry moves taint only upward, so byte k of the result is
//              tainted when any byte at or below k of either operand is.
//   GRAN_VAR : OR of the two tags.
// The document asks for one propagation module per functional unit and per
// granularity and leaves the rules to the library; these rules are this
// design's own. Combinational, no clock.
module pm_add
  import dift_pkg::*;
#(
  parameter gran_e       GRAN = GRAN_BIT,
  parameter int unsigned W    = 32,
  localparam int unsigned TW  = tag_width(GRAN, W)
) (
  input  logic          sub,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [TW-1:0] at,
  input  logic [TW-1:0] bt,
  output logic [TW-1:0] yt
);
  if (GRAN == GRAN_BIT) begin : g_bit
    logic [W-1:0] bb, lo, hi;
    always_comb begin
      bb = sub ? ~b : b;
      lo = (a & ~at) + (bb & ~bt) + W'(sub);
      hi = (a |  at) + (bb |  bt) + W'(sub);
      yt = (lo ^ hi) | at | bt;
    end
  end else if (GRAN == GRAN_BYTE) begin : g_byte
    always_comb begin
      logic acc;
      acc = 1'b0;
      for (int k = 0; k < int'(TW); k++) begin
        acc   = acc | at[k] | bt[k];
        yt[k] = acc;
      end
    end
  end else begin : g_var
    assign yt = at | bt;
  end
endmodule
