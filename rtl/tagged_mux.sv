// tagged_mux: an N-input multiplexer for data values and the matching
// multiplexer for their taint tags, both steered by one select signal.
//
// The shadow multiplexer has the same topology and the same select as the data
// multiplexer, which keeps data and tags flowing in step. The select is not
// itself tracked: the controller has passed its security checks, so the select
// is trusted (document, Sec. IV-C). Combinational. A select beyond N-1 gives
// input 0 (this design's choice).
module tagged_mux #(
  parameter int unsigned W  = 32,
  parameter int unsigned TW = 32,
  parameter int unsigned N  = 2,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [SW-1:0]         sel,
  input  logic [N-1:0][W-1:0]   d,
  input  logic [N-1:0][TW-1:0]  dt,
  output logic [W-1:0]          y,
  output logic [TW-1:0]         yt
);
  always_comb begin
    if (int'(sel) < int'(N)) begin
      y  = d[sel];
      yt = dt[sel];
    end else begin
      y  = d[0];
      yt = dt[0];
    end
  end
endmodule
