// pm_mul: taint propagation module of the multiplier (taint library), low W
// bits of the product.
//
//   GRAN_BIT : product bit k depends only on operand bits 0..k. It is tainted
//              when a tainted bit of one operand at or below k can meet a bit
//              of the other operand at or below k that may be 1 (known 1 or
//              tainted). A known-zero operand therefore gives an untainted
//              product. Sound, not exact.
//   GRAN_BYTE: byte k is tainted when any byte at or below k of either operand
//              is tainted (carries and partial products move upward only).
//   GRAN_VAR : OR of the two tags.
// The rules are this design's own; the document only says the multiplier's
// bit-level module is the most complex one. Combinational.
module pm_mul
  import dift_pkg::*;
#(
  parameter gran_e       GRAN = GRAN_BIT,
  parameter int unsigned W    = 32,
  localparam int unsigned TW  = tag_width(GRAN, W)
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [TW-1:0] at,
  input  logic [TW-1:0] bt,
  output logic [TW-1:0] yt
);
  if (GRAN == GRAN_BIT) begin : g_bit
    always_comb begin
      logic ta, tb, pa, pb;
      ta = 1'b0; tb = 1'b0; pa = 1'b0; pb = 1'b0;
      for (int k = 0; k < int'(W); k++) begin
        ta = ta | at[k];              // a tainted somewhere in 0..k
        tb = tb | bt[k];
        pa = pa | a[k] | at[k];       // a may be non-zero in 0..k
        pb = pb | b[k] | bt[k];
        yt[k] = (ta & pb) | (tb & pa);
      end
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
    logic unused;
    assign unused = ^{a, b};
    assign yt = at | bt;
  end
endmodule
