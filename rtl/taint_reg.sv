// taint_reg: a datapath register paired with its taint register.
//
// Both are written by the same write enable in the same clock edge, so a value
// and its tag are always stored together (as the document prescribes for every
// datapath register). Reset values are parameters: the accelerator resets
// datapath tags to 0 and parameter tags to all ones ("tainted by default").
// Interface: d/dt in, q/qt out, one cycle from we to q. Active-low async reset.
module taint_reg #(
  parameter int unsigned W         = 32,
  parameter int unsigned TW        = 32,
  parameter logic [W-1:0]  RST_VAL = '0,
  parameter logic [TW-1:0] RST_TAG = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [W-1:0]  d,
  input  logic [TW-1:0] dt,
  output logic [W-1:0]  q,
  output logic [TW-1:0] qt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q  <= RST_VAL;
      qt <= RST_TAG;
    end else if (we) begin
      q  <= d;
      qt <= dt;
    end
  end
endmodule
