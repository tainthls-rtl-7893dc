// taint_spm: local scratchpad memory (SPM) extended with a taint memory.
//
// One access per cycle from the controller: en/we/addr with write data and tag.
// Read data and read tag appear together one cycle after a read, the same
// latency as the memory without tags. Two layouts (document, Sec. IV-B):
//   SHARED = 0: a separate taint memory of DEPTH x TW bits, addressed by the
//               same address as the data memory (the default, as in Fig. 5).
//   SHARED = 1: one dual-port memory of 2*DEPTH x W words; port A accesses the
//               data area (0..DEPTH-1), port B the tag area, whose address is
//               DEPTH + addr (DEPTH a power of two). Requires TW <= W; tags are stored zero-extended.
// Memory contents are not reset (block RAM behaviour).
module taint_spm #(
  parameter int unsigned W      = 32,
  parameter int unsigned TW     = 32,
  parameter int unsigned DEPTH  = 256,
  parameter bit          SHARED = 1'b0,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  input  logic [TW-1:0] wtag,
  output logic [W-1:0]  rdata,
  output logic [TW-1:0] rtag
);
  if (!SHARED) begin : g_sep
    logic [W-1:0]  data_mem [DEPTH];
    logic [TW-1:0] tag_mem  [DEPTH];
    always_ff @(posedge clk) begin
      if (en) begin
        if (we) begin
          data_mem[addr] <= wdata;
          tag_mem[addr]  <= wtag;
        end
        rdata <= data_mem[addr];
        rtag  <= tag_mem[addr];
      end
    end
  end else begin : g_shared
    logic [W-1:0]  mem [2*DEPTH];
    logic [AW:0]   addr_b;
    logic [W-1:0]  rword_b;
    // address conversion for the second port: into the tag area
    assign addr_b = {1'b1, addr};
    // port A (data area) and port B (tag area) in one process
    always_ff @(posedge clk) begin
      if (en) begin
        if (we) begin
          mem[{1'b0, addr}] <= wdata;
          mem[addr_b]       <= W'(wtag);
        end
        rdata   <= mem[{1'b0, addr}];
        rword_b <= mem[addr_b];
      end
    end
    assign rtag = rword_b[TW-1:0];
    initial assert (TW <= W) else $error("taint_spm: shared layout needs TW <= W");
  end
endmodule
