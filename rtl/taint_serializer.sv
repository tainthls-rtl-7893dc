// taint_serializer: lets the accelerator exchange data and taint tags with
// external memory over a bus that has no taint lines.
//
// Upstream (memory interface side) each request carries a word address, write
// data and write tag; each response returns read data and read tag. Downstream
// every request becomes two bus transactions, data first and tag second. Two
// tag layouts in external memory:
//   INTERLEAVE = 1 (default): tags interleaved with the data; the word address
//     is shifted left by one bit and the new least significant bit selects
//     data (0) or tag (1); the top address bit is dropped;
//   INTERLEAVE = 0: tags in a dedicated region; data at the word address
//     unchanged, tag at TAG_BASE + address.
// A tag travels in the low TW bits
// of a bus word. Both sides use a valid/ready request and a response valid;
// the bus answers every request, writes included, with one response, so the
// computation resumes only when the transfer is complete (latency-insensitive).
// The data transaction goes out in the cycle the request arrives and the
// response is returned in the cycle the tag arrives, so every memory operation
// takes exactly twice the bus time of a single transaction. Both layouts
// and the serialization follow the document; the ordering, the handshake and
// the TAG_BASE default (upper half of the address space) are this design's.
module taint_serializer #(
  parameter int unsigned W  = 32,
  parameter int unsigned TW = 32,
  parameter int unsigned AW = 32,
  parameter bit          INTERLEAVE = 1'b1,
  parameter logic [AW-1:0] TAG_BASE = AW'(1) << (AW - 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // upstream
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  logic [AW-1:0] req_addr,
  input  logic [W-1:0]  req_wdata,
  input  logic [TW-1:0] req_wtag,
  output logic          resp_valid,
  output logic [W-1:0]  resp_rdata,
  output logic [TW-1:0] resp_rtag,
  // downstream bus without taint lines
  output logic          bus_req_valid,
  input  logic          bus_req_ready,
  output logic          bus_we,
  output logic [AW-1:0] bus_addr,
  output logic [W-1:0]  bus_wdata,
  input  logic          bus_resp_valid,
  input  logic [W-1:0]  bus_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_DWAIT, S_TREQ, S_TWAIT} state_e;
  state_e        state;
  logic          we_q;
  logic [AW-1:0] addr_q;
  logic [W-1:0]  rdata_q;
  logic [TW-1:0] wtag_q;

  // The data transaction is offered to the bus straight from the upstream
  // request, and the upstream response is given in the cycle the tag arrives,
  // so a serialized operation costs exactly two bus transactions.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      we_q    <= 1'b0;
      addr_q  <= '0;
      wtag_q  <= '0;
      rdata_q <= '0;
    end else begin
      case (state)
        S_IDLE: if (req_valid && bus_req_ready) begin
          we_q   <= req_we;
          addr_q <= req_addr;
          wtag_q <= req_wtag;
          state  <= S_DWAIT;
        end
        S_DWAIT: if (bus_resp_valid) begin
          rdata_q <= bus_rdata;
          state   <= S_TREQ;
        end
        S_TREQ:  if (bus_req_ready) state <= S_TWAIT;
        default: if (bus_resp_valid) state <= S_IDLE;   // S_TWAIT
      endcase
    end
  end

  always_comb begin
    if (state == S_IDLE) begin
      bus_req_valid = req_valid;
      bus_we        = req_we;
      bus_addr      = INTERLEAVE ? {req_addr[AW-2:0], 1'b0} : req_addr;
      bus_wdata     = req_wdata;
    end else begin
      bus_req_valid = (state == S_TREQ);
      bus_we        = we_q;
      bus_addr      = INTERLEAVE ? {addr_q[AW-2:0], 1'b1} : TAG_BASE + addr_q;
      bus_wdata     = W'(wtag_q);
    end
  end

  assign req_ready  = (state == S_IDLE) && bus_req_ready;
  assign resp_valid = (state == S_TWAIT) && bus_resp_valid;
  assign resp_rdata = rdata_q;
  assign resp_rtag  = bus_rdata[TW-1:0];

  // a response is only ever expected while waiting for one
  property p_no_stray_resp;
    @(posedge clk) disable iff (!rst_n)
      bus_resp_valid |-> (state == S_DWAIT || state == S_TWAIT);
  endproperty
  assert property (p_no_stray_resp);
  // a bus request stays up until accepted
  assert property (@(posedge clk) disable iff (!rst_n)
    bus_req_valid && !bus_req_ready |=> bus_req_valid && $stable(bus_addr));
endmodule
