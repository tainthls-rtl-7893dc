// tb_dift_validation: validation of the accelerator's tags against software
// DIFT. For each granularity, 100 random combinations of input data, element
// count, key and taint tags are run on the accelerator, and the returned tag
// and the tag stored in external memory are compared for equality with a
// software taint-tracking model of the C kernel. The software model applies
// the propagation rules operation by operation at the C level (as a
// taint-tracking library instruments a program); the accelerator must produce
// the same tags through its registers, multiplexers, chained units, scratchpad
// taint memory and external memory path. Return values are compared with the
// plain C result. Bit tags use the serializer, byte and variable tags a
// dedicated taint bus.
module tb_dift_validation;
  import dift_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int DEPTH = 32;
  localparam logic [31:0] SRC = 32'h200, DST = 32'h7C0;

  // ---------------------------------------------------------------- three DUTs
  logic        cfg_we;
  logic [4:0]  cfg_addr;
  logic [31:0] cfg_wdata;
  logic [31:0] rdat [3];
  logic        irq [3], done [3];

  logic        rv0, ry0, we0, rsv0; logic [31:0] a0, wd0, rd0, wt0, rt0;
  logic        rv1, ry1, we1, rsv1; logic [31:0] a1, wd1, rd1; logic [3:0] wt1, rt1;
  logic        rv2, ry2, we2, rsv2; logic [31:0] a2, wd2, rd2; logic wt2, rt2;

  dift_accel #(.GRAN(GRAN_BIT), .DEPTH(DEPTH), .TAINT_BUS(1'b0)) d0 (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata(rdat[0]), .irq(irq[0]), .done(done[0]),
    .ext_req_valid(rv0), .ext_req_ready(ry0), .ext_we(we0), .ext_addr(a0), .ext_wdata(wd0), .ext_wtag(wt0),
    .ext_resp_valid(rsv0), .ext_rdata(rd0), .ext_rtag(rt0));
  ext_mem_model #(.W(32), .TW(32), .LAT(2), .RANDOM_READY(1'b1)) m0 (
    .clk, .req_valid(rv0), .req_ready(ry0), .we(we0), .addr(a0), .wdata(wd0), .wtag(wt0),
    .resp_valid(rsv0), .rdata(rd0), .rtag(rt0));

  dift_accel #(.GRAN(GRAN_BYTE), .DEPTH(DEPTH), .TAINT_BUS(1'b1)) d1 (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata(rdat[1]), .irq(irq[1]), .done(done[1]),
    .ext_req_valid(rv1), .ext_req_ready(ry1), .ext_we(we1), .ext_addr(a1), .ext_wdata(wd1), .ext_wtag(wt1),
    .ext_resp_valid(rsv1), .ext_rdata(rd1), .ext_rtag(rt1));
  ext_mem_model #(.W(32), .TW(4), .LAT(2), .RANDOM_READY(1'b1)) m1 (
    .clk, .req_valid(rv1), .req_ready(ry1), .we(we1), .addr(a1), .wdata(wd1), .wtag(wt1),
    .resp_valid(rsv1), .rdata(rd1), .rtag(rt1));

  dift_accel #(.GRAN(GRAN_VAR), .DEPTH(DEPTH), .TAINT_BUS(1'b1)) d2 (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata(rdat[2]), .irq(irq[2]), .done(done[2]),
    .ext_req_valid(rv2), .ext_req_ready(ry2), .ext_we(we2), .ext_addr(a2), .ext_wdata(wd2), .ext_wtag(wt2),
    .ext_resp_valid(rsv2), .ext_rdata(rd2), .ext_rtag(rt2));
  ext_mem_model #(.W(32), .TW(1), .LAT(2), .RANDOM_READY(1'b1)) m2 (
    .clk, .req_valid(rv2), .req_ready(ry2), .we(we2), .addr(a2), .wdata(wd2), .wtag(wt2),
    .resp_valid(rsv2), .rdata(rd2), .rtag(rt2));

  // ---------------------------------------------------------------- software DIFT
  // Tags are kept as 32-bit masks in the model; g selects the granularity and
  // the mask is widened to whole groups after every operation.
  function automatic logic [31:0] widen(int g, logic [31:0] m);
    logic [31:0] r;
    case (g)
      0: r = m;
      1: for (int k = 0; k < 4; k++) r[k*8 +: 8] = {8{|m[k*8 +: 8]}};
      default: r = {32{|m}};
    endcase
    return r;
  endfunction

  function automatic logic [31:0] t_xor(int g, logic [31:0] at, logic [31:0] bt);
    return widen(g, at | bt);
  endfunction

  function automatic logic [31:0] t_add(int g, logic [31:0] a, logic [31:0] b, logic [31:0] at, logic [31:0] bt);
    logic [31:0] r;
    logic acc;
    case (g)
      0: r = (((a & ~at) + (b & ~bt)) ^ ((a | at) + (b | bt))) | at | bt;
      1: begin
        acc = 0;
        for (int k = 0; k < 4; k++) begin acc |= |(at[k*8 +: 8] | bt[k*8 +: 8]); r[k*8 +: 8] = {8{acc}}; end
      end
      default: r = {32{|(at | bt)}};
    endcase
    return r;
  endfunction

  // multiplication by the untainted constant 31 (bit 0 set): every bit at or
  // above the lowest tainted bit can change
  function automatic logic [31:0] t_mul31(int g, logic [31:0] at);
    logic [31:0] r;
    logic acc;
    acc = 0;
    for (int k = 0; k < 32; k++) begin acc |= at[k]; r[k] = acc; end
    return widen(g, g == 2 ? at : r);
  endfunction

  function automatic logic [31:0] t_shr16(int g, logic [31:0] at);
    return widen(g, at >> 16);
  endfunction

  // ---------------------------------------------------------------- helpers
  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 5'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  function automatic logic [31:0] to_mask(int g, logic [31:0] t);
    logic [31:0] m;
    case (g)
      0: m = t;
      1: for (int k = 0; k < 32; k++) m[k] = t[k / 8];
      default: m = {32{t[0]}};
    endcase
    return m;
  endfunction

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] xs [DEPTH], key, acc, r, x;
    logic [31:0] xm [3][DEPTH], km [3], accm, rm, bufm, xtag [3][DEPTH];
    logic [31:0] ktag [3];
    int n, nz;
    cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // untainted pointers and bound
    wr(REG_SRC, SRC); wr(REG_DST, DST);
    wr(REG_SRC_TAG, 0); wr(REG_DST_TAG, 0); wr(REG_N_TAG, 0);
    nz = 0;
    for (int t = 0; t < 100; t++) begin
      n = $urandom_range(1, DEPTH);
      key = $urandom();
      // The three accelerators share one configuration bus, so they receive the
      // same key tag word; each keeps the low TW bits of it as its own tag.
      ktag[0] = ($urandom_range(0, 2) == 0) ? ($urandom() & $urandom() & $urandom()) : 0;
      ktag[1] = 32'(ktag[0][3:0]);
      ktag[2] = 32'(ktag[0][0]);
      for (int i = 0; i < DEPTH; i++) begin
        xs[i] = $urandom();
        xtag[0][i] = ($urandom_range(0, 7) == 0) ? ($urandom() & $urandom() & $urandom() & $urandom()) : 0;
        xtag[1][i] = 32'(xtag[0][i] != 0 ? $urandom_range(1, 15) : 0);
        xtag[2][i] = 32'(xtag[0][i] != 0);
        m0.mem[12'((SRC + 32'(i)) * 2)] = xs[i];
        m0.mem[12'((SRC + 32'(i)) * 2 + 1)] = xtag[0][i];
        m1.mem[12'(SRC + 32'(i))] = xs[i]; m1.tmem[12'(SRC + 32'(i))] = 4'(xtag[1][i]);
        m2.mem[12'(SRC + 32'(i))] = xs[i]; m2.tmem[12'(SRC + 32'(i))] = 1'(xtag[2][i]);
      end
      wr(REG_N, 32'(n)); wr(REG_KEY, key); wr(REG_KEY_TAG, ktag[0]);
      wr(REG_CTRL, 1);
      fork
        wait (done[0] || irq[0]);
        wait (done[1] || irq[1]);
        wait (done[2] || irq[2]);
      join
      @(posedge clk); @(negedge clk);
      // plain C result
      acc = 0;
      for (int i = 0; i < n; i++) acc = acc * 31 + (xs[i] ^ key);
      r = acc ^ (acc >> 16);
      for (int g = 0; g < 3; g++) begin
        logic [31:0] stored, stored_tag, ret_tag;
        // software DIFT
        accm = 0;
        acc  = 0;
        for (int i = 0; i < n; i++) begin
          x    = xs[i] ^ key;
          bufm = t_xor(g, to_mask(g, xtag[g][i]), to_mask(g, ktag[g]));
          accm = t_add(g, acc * 31, x, t_mul31(g, accm), bufm);
          acc  = acc * 31 + x;
        end
        rm = t_xor(g, accm, t_shr16(g, accm));
        cfg_addr = 5'(REG_RET); #1;
        check($sformatf("t=%0d g=%0d return value", t, g), rdat[g] == r && !irq[g]);
        cfg_addr = 5'(REG_RET_TAG); #1;
        ret_tag = rdat[g];
        case (g)
          0: begin stored = m0.mem[12'(DST * 2)]; stored_tag = m0.mem[12'(DST * 2 + 1)]; end
          1: begin stored = m1.mem[12'(DST)]; stored_tag = 32'(m1.tmem[12'(DST)]); end
          default: begin stored = m2.mem[12'(DST)]; stored_tag = 32'(m2.tmem[12'(DST)]); end
        endcase
        check($sformatf("t=%0d g=%0d stored value", t, g), stored == r);
        check($sformatf("t=%0d g=%0d return tag %h vs software %h", t, g, to_mask(g, ret_tag), rm),
              to_mask(g, ret_tag) == rm);
        check($sformatf("t=%0d g=%0d stored tag", t, g), stored_tag == ret_tag);
        if (g == 0 && rm != 0) nz++;
      end
    end
    check("some results were tainted", nz > 10);
    $display("tainted results (bit level): %0d of 100", nz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
