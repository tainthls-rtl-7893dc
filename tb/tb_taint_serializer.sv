// tb_taint_serializer: random reads and writes through two serializers, one
// with tags interleaved with data (data at 2a, tag at 2a+1) and one with tags
// in a separate region (data at a, tag at TAG_BASE + a), each into its own
// external memory model. Checks both layouts, that read data and tags come
// back, that every operation costs exactly two bus transactions and, with a
// bus that is always ready, that an operation takes exactly twice the cycles
// of one bus transaction.
module tb_taint_serializer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam logic [31:0] TAG_BASE = 32'h800;

  logic        req_valid [2], req_ready [2], resp_valid [2];
  logic        req_we;
  logic [31:0] req_addr, req_wdata, resp_rdata [2];
  logic [7:0]  req_wtag, resp_rtag [2];
  logic        bus_req_valid [2], bus_req_ready [2], bus_we [2], bus_resp_valid [2];
  logic [31:0] bus_addr [2], bus_wdata [2], bus_rdata [2];
  logic [7:0]  unused_rtag [2];

  taint_serializer #(.W(32), .TW(8), .AW(32)) dut_il (
    .clk, .rst_n, .req_valid(req_valid[0]), .req_ready(req_ready[0]), .req_we, .req_addr, .req_wdata, .req_wtag,
    .resp_valid(resp_valid[0]), .resp_rdata(resp_rdata[0]), .resp_rtag(resp_rtag[0]),
    .bus_req_valid(bus_req_valid[0]), .bus_req_ready(bus_req_ready[0]), .bus_we(bus_we[0]), .bus_addr(bus_addr[0]),
    .bus_wdata(bus_wdata[0]), .bus_resp_valid(bus_resp_valid[0]), .bus_rdata(bus_rdata[0]));
  taint_serializer #(.W(32), .TW(8), .AW(32), .INTERLEAVE(1'b0), .TAG_BASE(TAG_BASE)) dut_sep (
    .clk, .rst_n, .req_valid(req_valid[1]), .req_ready(req_ready[1]), .req_we, .req_addr, .req_wdata, .req_wtag,
    .resp_valid(resp_valid[1]), .resp_rdata(resp_rdata[1]), .resp_rtag(resp_rtag[1]),
    .bus_req_valid(bus_req_valid[1]), .bus_req_ready(bus_req_ready[1]), .bus_we(bus_we[1]), .bus_addr(bus_addr[1]),
    .bus_wdata(bus_wdata[1]), .bus_resp_valid(bus_resp_valid[1]), .bus_rdata(bus_rdata[1]));

  // memory 0 stalls at random; memory 1 is always ready (cycle-count check)
  ext_mem_model #(.W(32), .TW(8), .LAT(2), .RANDOM_READY(1'b1)) mem0 (
    .clk, .req_valid(bus_req_valid[0]), .req_ready(bus_req_ready[0]), .we(bus_we[0]),
    .addr(bus_addr[0]), .wdata(bus_wdata[0]), .wtag(8'h00),
    .resp_valid(bus_resp_valid[0]), .rdata(bus_rdata[0]), .rtag(unused_rtag[0]));
  ext_mem_model #(.W(32), .TW(8), .LAT(2), .RANDOM_READY(1'b0)) mem1 (
    .clk, .req_valid(bus_req_valid[1]), .req_ready(bus_req_ready[1]), .we(bus_we[1]),
    .addr(bus_addr[1]), .wdata(bus_wdata[1]), .wtag(8'h00),
    .resp_valid(bus_resp_valid[1]), .rdata(bus_rdata[1]), .rtag(unused_rtag[1]));

  logic [31:0] md [64];
  logic [7:0]  mt [64];
  int          cyc [2];

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(logic w, int a, logic [31:0] d, logic [7:0] t);
    logic [31:0] rd [2];
    logic [7:0]  rt [2];
    @(negedge clk);
    req_we = w; req_addr = 32'(a + 100); req_wdata = d; req_wtag = t;
    fork
      begin
        int c; c = 0;
        req_valid[0] = 1;
        do begin @(posedge clk); c++; end while (!req_ready[0]);
        #1 req_valid[0] = 0;
        while (!resp_valid[0]) begin @(posedge clk); #1; c++; end
        rd[0] = resp_rdata[0]; rt[0] = resp_rtag[0]; cyc[0] = c;
      end
      begin
        int c; c = 0;
        // the memory re-arms ready one cycle after a response; start the
        // cycle count on an idle memory
        while (!bus_req_ready[1]) @(negedge clk);
        req_valid[1] = 1;
        do begin @(posedge clk); c++; end while (!req_ready[1]);
        #1 req_valid[1] = 0;
        while (!resp_valid[1]) begin @(posedge clk); #1; c++; end
        rd[1] = resp_rdata[1]; rt[1] = resp_rtag[1]; cyc[1] = c;
      end
    join
    if (!w) for (int k = 0; k < 2; k++) begin
      check($sformatf("dut%0d read data a=%0d", k, a), rd[k] == md[a]);
      check($sformatf("dut%0d read tag a=%0d", k, a), rt[k] == mt[a]);
    end
    // memory 1 answers a transaction in LAT + 1 = 3 cycles after it is
    // offered; two transactions plus the 1-cycle gap between them
    check($sformatf("serialized operation takes two transactions (%0d cycles, w=%0d a=%0d)", cyc[1], w, a), cyc[1] == 2 * 3 + 1);
  endtask

  initial begin
    int n0 [2];
    req_valid[0] = 0; req_valid[1] = 0;
    req_we = 0; req_addr = '0; req_wdata = '0; req_wtag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      md[a] = 32'($urandom()); mt[a] = 8'($urandom());
      op(1'b1, a, md[a], mt[a]);
      check("interleaved: data word at 2a", mem0.mem[12'((a + 100) * 2)] == md[a]);
      check("interleaved: tag word at 2a+1", mem0.mem[12'((a + 100) * 2 + 1)] == 32'(mt[a]));
      check("separate: data word at a", mem1.mem[12'(a + 100)] == md[a]);
      check("separate: tag word at TAG_BASE+a", mem1.mem[12'(TAG_BASE + 32'(a + 100))] == 32'(mt[a]));
    end
    n0[0] = mem0.nreq; n0[1] = mem1.nreq;
    for (int t = 0; t < 300; t++) begin
      int a;
      a = $urandom_range(0, 63);
      if ($urandom_range(0, 1)) begin
        md[a] = 32'($urandom()); mt[a] = 8'($urandom());
        op(1'b1, a, md[a], mt[a]);
      end else op(1'b0, a, 32'd0, 8'd0);
    end
    check("two bus transactions per operation (interleaved)", mem0.nreq - n0[0] == 600);
    check("two bus transactions per operation (separate)", mem1.nreq - n0[1] == 600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
