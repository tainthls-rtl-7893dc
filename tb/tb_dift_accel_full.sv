// tb_dift_accel_full: one complete kernel invocation on dift_accel with every
// parameter at its default (bit-level tags, 32-bit words, 256-word scratchpad,
// serializer to external memory). The host clears the parameter tags except
// one bit of the key, marks three input words as partly tainted in external
// memory, runs n = 256, and checks the return value, the stored word and tag,
// the number of bus transactions (two per memory operation) and that the
// return tag covers every result bit that changes when the tainted input
// bits take other values.
module tb_dift_accel_full;
  import dift_pkg::*;
  localparam int N = 256;
  localparam logic [31:0] SRC = 32'h040, DST = 32'h7F0;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_we, irq, done;
  logic [4:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic        ext_req_valid, ext_req_ready, ext_we, ext_resp_valid;
  logic [31:0] ext_addr, ext_wdata, ext_rdata, ext_wtag, ext_rtag;

  dift_accel dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .irq, .done,
    .ext_req_valid, .ext_req_ready, .ext_we, .ext_addr, .ext_wdata, .ext_wtag,
    .ext_resp_valid, .ext_rdata, .ext_rtag);

  ext_mem_model #(.W(32), .TW(32), .LAT(3), .RANDOM_READY(1'b1)) mem (
    .clk, .req_valid(ext_req_valid), .req_ready(ext_req_ready), .we(ext_we),
    .addr(ext_addr), .wdata(ext_wdata), .wtag(ext_wtag),
    .resp_valid(ext_resp_valid), .rdata(ext_rdata), .rtag(ext_rtag));

  logic [31:0] xs [N], xt [N];

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] kernel(logic [31:0] x [N], logic [31:0] key);
    logic [31:0] acc;
    acc = 0;
    for (int i = 0; i < N; i++) acc = acc * 31 + (x[i] ^ key);
    return acc ^ (acc >> 16);
  endfunction

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 5'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] key, key_t, r, chg, rt, x2 [N], k2;
    int cycles, nreq0;
    cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    key = 32'h5A5A_1234; key_t = 32'h0000_0100;
    for (int i = 0; i < N; i++) begin
      xs[i] = $urandom();
      xt[i] = (i == 7 || i == 100 || i == 255) ? 32'h0000_00F0 << (i % 3) : 32'h0;
      mem.mem[12'((SRC + 32'(i)) * 2)]     = xs[i];   // data at 2a
      mem.mem[12'((SRC + 32'(i)) * 2 + 1)] = xt[i];   // tag at 2a+1
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(REG_SRC, SRC); wr(REG_DST, DST); wr(REG_N, N); wr(REG_KEY, key);
    wr(REG_SRC_TAG, 0); wr(REG_DST_TAG, 0); wr(REG_N_TAG, 0); wr(REG_KEY_TAG, key_t);
    nreq0 = mem.nreq;
    wr(REG_CTRL, 1);
    cycles = 0;
    while (!done && !irq) begin @(posedge clk); #1; cycles++; end
    check("finished without a security interrupt", !irq);
    @(posedge clk);   // return value is captured at the end of the done cycle
    @(negedge clk);
    r = kernel(xs, key);
    cfg_addr = 5'(REG_RET); #1;
    check("return value", cfg_rdata == r);
    cfg_addr = 5'(REG_RET_TAG); #1;
    rt = cfg_rdata;
    check("stored result", mem.mem[12'(DST * 2)] == r);
    check("stored tag", mem.mem[12'(DST * 2 + 1)] == rt);
    check("two bus transactions per memory operation", mem.nreq - nreq0 == 2 * (N + 1));
    chg = 0;
    for (int s = 0; s < 32; s++) begin
      for (int i = 0; i < N; i++) x2[i] = (xs[i] & ~xt[i]) | ($urandom() & xt[i]);
      k2 = (key & ~key_t) | ($urandom() & key_t);
      chg |= kernel(x2, k2) ^ r;
    end
    check($sformatf("return tag %h covers changing bits %h", rt, chg), (chg & ~rt) == 0);
    check("result is tainted", rt != 0);
    $display("n=%0d: %0d cycles, return tag %h", N, cycles, rt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
