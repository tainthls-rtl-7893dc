// ext_mem_model: behavioural model of external memory behind the system bus,
// for testbenches only. Word-addressed, sparse (address hashed into 4096 words),
// valid/ready requests and one response per request (writes included). ready
// is random when RANDOM_READY is set; the response comes LAT cycles after the
// request is accepted. Memory is filled with a known pattern at start.
module ext_mem_model #(
  parameter int unsigned W   = 32,
  parameter int unsigned TW  = 32,
  parameter int unsigned LAT = 3,
  parameter bit RANDOM_READY = 1'b1
) (
  input  logic          clk,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          we,
  input  logic [W-1:0]  addr,
  input  logic [W-1:0]  wdata,
  input  logic [TW-1:0] wtag,
  output logic          resp_valid,
  output logic [W-1:0]  rdata,
  output logic [TW-1:0] rtag
);
  logic [W-1:0]  mem  [4096];
  logic [TW-1:0] tmem [4096];
  int            nreq = 0, nwr = 0;
  int            busy_cnt = 0;
  logic [W-1:0]  pend_data;
  logic [TW-1:0] pend_tag;

  initial begin
    for (int k = 0; k < 4096; k++) begin
      mem[k]  = W'(k * 32'h9E37 + 1);
      tmem[k] = '0;
    end
    req_ready = 1'b0; resp_valid = 1'b0; rdata = '0; rtag = '0;
    pend_data = '0; pend_tag = '0;
  end

  always @(posedge clk) begin
    resp_valid <= 1'b0;
    if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) begin
        resp_valid <= 1'b1;
        rdata      <= pend_data;
        rtag       <= pend_tag;
      end
      req_ready <= 1'b0;
    end else if (req_valid && req_ready) begin
      nreq++;
      if (we) begin
        nwr++;
        mem[addr[11:0]]  <= wdata;
        tmem[addr[11:0]] <= wtag;
      end
      pend_data <= mem[addr[11:0]];
      pend_tag  <= tmem[addr[11:0]];
      busy_cnt  <= LAT;
      req_ready <= 1'b0;
    end else begin
      req_ready <= RANDOM_READY ? 1'($urandom()) : 1'b1;
    end
  end
endmodule
