// tb_dift_accel_env: test environment for one configuration of dift_accel,
// instantiated by the end-to-end testbench. It holds the accelerator, an
// external memory model (tags interleaved with data or at TAG_BASE + address
// when the serializer is used) and a host that programs the configuration registers,
// and runs a fixed series of kernel invocations, each checked against a
// software model of the kernel:
//   - result value, stored word and interrupt/done behaviour;
//   - the return tag: it must cover every result bit that changes when the
//     tainted input bits are given other values (sampled), and for variable
//     tags it must equal the OR of all input tags;
//   - the stored tag in external memory equals the return tag;
//   - policy cases: tainted-by-default parameters, tainted loop bound with
//     critical and non-critical transitions, tainted pointers under strict,
//     permissive, critical-pointer and benign settings, recovery by clearing the interrupt;
//   - cycle counts: linear in n and unchanged by taint.
// Each mechanism is counted; a mechanism that never happened counts a failure.
module tb_dift_accel_env
  import dift_pkg::*;
#(
  parameter gran_e GRAN       = GRAN_BIT,
  parameter bit    TAINT_BUS  = 1'b0,
  parameter bit    SPM_SHARED = 1'b0,
  parameter int    DEPTH      = 32,
  parameter bit    RANDOM_READY = 1'b0,
  parameter bit    INTERLEAVE = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished,
  output int   per_elem_cycles
);
  localparam int TW = tag_width(GRAN, 32);
  localparam int G  = group_size(GRAN, 32);
  localparam logic [31:0] SRC = 32'h100, DST = 32'h700;
  localparam logic [31:0] TAG_BASE = 32'h800;   // tag region when not interleaved

  logic        cfg_we;
  logic [4:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic        irq, done;
  logic        ext_req_valid, ext_req_ready, ext_we, ext_resp_valid;
  logic [31:0] ext_addr, ext_wdata, ext_rdata;
  logic [TW-1:0] ext_wtag, ext_rtag;

  dift_accel #(.GRAN(GRAN), .W(32), .DEPTH(DEPTH), .TAINT_BUS(TAINT_BUS), .SPM_SHARED(SPM_SHARED),
               .INTERLEAVE(INTERLEAVE), .TAG_BASE(TAG_BASE)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .irq, .done,
    .ext_req_valid, .ext_req_ready, .ext_we, .ext_addr, .ext_wdata, .ext_wtag,
    .ext_resp_valid, .ext_rdata, .ext_rtag);

  ext_mem_model #(.W(32), .TW(TW), .LAT(3), .RANDOM_READY(RANDOM_READY)) mem (
    .clk, .req_valid(ext_req_valid), .req_ready(ext_req_ready), .we(ext_we),
    .addr(ext_addr), .wdata(ext_wdata), .wtag(ext_wtag),
    .resp_valid(ext_resp_valid), .rdata(ext_rdata), .rtag(ext_rtag));

  // software copy of the input array and its tags
  logic [31:0]   xs [DEPTH];
  logic [TW-1:0] xt [DEPTH];

  // mechanism counters
  int n_clean = 0, n_propagated = 0, n_default_halt = 0, n_branch_halt = 0,
      n_noncritical_pass = 0, n_mem_halt = 0, n_permissive_pass = 0, n_benign_pass = 0,
      n_critical_ptr_halt = 0,
      n_recover = 0, n_serial_ops = 0, n_same_cycles = 0;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL [gran=%0d bus=%0d] %s", GRAN, TAINT_BUS, what); end
  endtask

  function automatic logic [31:0] grow(logic [TW-1:0] t);
    logic [31:0] m;
    for (int k = 0; k < 32; k++) m[k] = t[k / G];
    return m;
  endfunction

  function automatic logic [31:0] kernel(logic [31:0] x [DEPTH], int n, logic [31:0] key);
    logic [31:0] acc;
    acc = 0;
    for (int i = 0; i < n; i++) acc = acc * 31 + (x[i] ^ key);
    return acc ^ (acc >> 16);
  endfunction

  task automatic put(logic [31:0] a, logic [31:0] d, logic [TW-1:0] t);
    if (TAINT_BUS) begin
      mem.mem[a[11:0]] = d; mem.tmem[a[11:0]] = t;
    end else if (INTERLEAVE) begin
      mem.mem[12'(a * 2)] = d; mem.mem[12'(a * 2 + 1)] = 32'(t);
    end else begin
      mem.mem[a[11:0]] = d; mem.mem[12'(TAG_BASE + a)] = 32'(t);
    end
  endtask

  task automatic get(logic [31:0] a, output logic [31:0] d, output logic [TW-1:0] t);
    if (TAINT_BUS) begin
      d = mem.mem[a[11:0]]; t = mem.tmem[a[11:0]];
    end else if (INTERLEAVE) begin
      d = mem.mem[12'(a * 2)]; t = TW'(mem.mem[12'(a * 2 + 1)]);
    end else begin
      d = mem.mem[a[11:0]]; t = TW'(mem.mem[12'(TAG_BASE + a)]);
    end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 5'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  logic [31:0] rv;
  task automatic rd(int a);
    @(negedge clk); cfg_addr = 5'(a); #1; rv = cfg_rdata;
  endtask

  logic [31:0] crit_ptrs = '0;   // written to MEM_CRIT by every run

  // One invocation. Tags of parameters are written only when set_tags.
  // Returns the cycles from start to done (or to the interrupt).
  task automatic run(input int n, input logic [31:0] key, input logic set_tags,
                     input logic [TW-1:0] key_t, n_t, src_t, dst_t,
                     input logic [31:0] br_pol, mem_pol, benign,
                     input int exp_viol,         // 0 none, 1 branch, 2 memory
                     input int exp_id,
                     input int tainted_elems,    // elements whose data tag is non-zero
                     output int cycles);
    logic [31:0] r, d, chg, rt_bits;
    logic [TW-1:0] rt, t, tor;
    logic [31:0] xs2 [DEPTH];
    int nreq0, c;
    // input data and tags
    tor = TW'(0);
    for (int i = 0; i < DEPTH; i++) begin
      xs[i] = $urandom();
      xt[i] = (i < tainted_elems) ? TW'($urandom() | 1) & TW'($urandom() | 1) : TW'(0);
      if (xt[i] == 0 && i < tainted_elems) xt[i] = TW'(1);
      if (i < n) tor |= xt[i];
      put(SRC + 32'(i), xs[i], xt[i]);
    end
    put(DST, 32'hDEAD_BEEF, TW'(0));
    wr(REG_SRC, SRC); wr(REG_DST, DST); wr(REG_N, 32'(n)); wr(REG_KEY, key);
    if (set_tags) begin
      wr(REG_SRC_TAG, 32'(src_t)); wr(REG_DST_TAG, 32'(dst_t));
      wr(REG_N_TAG, 32'(n_t));     wr(REG_KEY_TAG, 32'(key_t));
    end
    wr(REG_BR_POL, br_pol); wr(REG_MEM_POL, mem_pol); wr(REG_MEM_BENIGN, benign); wr(REG_MEM_CRIT, crit_ptrs);
    nreq0 = mem.nreq;
    wr(REG_CTRL, 32'h1);
    c = 0;
    while (!done && !irq) begin @(posedge clk); #1; c++; end
    cycles = c;
    if (exp_viol != 0) begin
      check("interrupt raised", irq == 1'b1);
      check("no done", done == 1'b0);
      repeat (3) @(posedge clk);
      rd(REG_STATUS);
      check($sformatf("cause %0d/%0d", rv[5:4], exp_viol), int'(rv[5:4]) == exp_viol);
      check($sformatf("cause id %0d/%0d", rv[15:8], exp_id), int'(rv[15:8]) == exp_id);
      check("still halted", rv[0] == 1'b1 && irq == 1'b1);
      wr(REG_CTRL, 32'h2);
      repeat (2) @(posedge clk);
      rd(REG_STATUS);
      check("interrupt cleared, idle", rv[2:0] == 3'b000);
      n_recover++;
      return;
    end
    check("no interrupt", irq == 1'b0);
    @(posedge clk); #1;
    r = kernel(xs, n, key);
    rd(REG_RET); check($sformatf("return value n=%0d", n), rv == r);
    rd(REG_RET_TAG); rt = TW'(rv);
    get(DST, d, t);
    check("stored result", d == r);
    check("stored tag equals return tag", t == rt);
    if (!TAINT_BUS) begin
      check("serializer: two bus transactions per memory operation", mem.nreq - nreq0 == 2 * (n + 1));
      n_serial_ops += n + 1;
    end else
      check("dedicated taint bus: one transaction per memory operation", mem.nreq - nreq0 == n + 1);
    // soundness of the return tag: vary the tainted input bits
    chg = 0;
    for (int s = 0; s < 48; s++) begin
      logic [31:0] k2;
      for (int i = 0; i < DEPTH; i++) xs2[i] = (xs[i] & ~grow(xt[i])) | ($urandom() & grow(xt[i]));
      k2 = (key & ~grow(key_t)) | ($urandom() & grow(key_t));
      chg |= kernel(xs2, n, k2) ^ r;
    end
    rt_bits = grow(rt);
    check($sformatf("return tag covers every changing bit (tag=%h chg=%h)", rt_bits, chg), (chg & ~rt_bits) == 0);
    if (GRAN == GRAN_VAR)
      check("variable tag = OR of inputs", rt == ((n > 0) ? (key_t | tor) : TW'(0)));
    if (key_t == 0 && tor == 0) begin
      check("clean inputs give a clean result", rt == 0);
      n_clean++;
    end else if (chg != 0) begin
      check("tainted inputs reach the result", rt != 0);
      n_propagated++;
    end
  endtask

  initial begin
    int c1, c2, c5, c5t, cy;
    logic [TW-1:0] z, ones, lowbit;
    checks = 0; failures = 0; finished = 0; per_elem_cycles = 0;
    cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    z = '0; ones = '1; lowbit = TW'(1);
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    // 1. tags left at their reset value: everything tainted, strict default policy
    run(4, 32'h1234_5678, 1'b0, z, z, z, z, 32'h0000_FF01, 32'hFFFF_FFFF, 32'h0, 1, 0, 0, cy);
    n_default_halt++;
    // 2. clean runs of several sizes: cycle counts
    run(1, 32'hA5A5_0F0F, 1'b1, z, z, z, z, 32'h1, 32'hFFFF_FFFF, 32'h0, 0, 0, 0, c1);
    run(2, 32'hA5A5_0F0F, 1'b1, z, z, z, z, 32'h1, 32'hFFFF_FFFF, 32'h0, 0, 0, 0, c2);
    run(5, 32'hA5A5_0F0F, 1'b1, z, z, z, z, 32'h1, 32'hFFFF_FFFF, 32'h0, 0, 0, 0, c5);
    if (!RANDOM_READY) begin
      check($sformatf("cycles linear in n (%0d %0d %0d)", c1, c2, c5), c5 - c2 == 3 * (c2 - c1));
      per_elem_cycles = c2 - c1;
    end
    // 3. tainted key and tainted elements: same cycle count, tags propagate
    run(5, 32'hA5A5_0F0F, 1'b1, lowbit, z, z, z, 32'h1, 32'hFFFF_FFFF, 32'h0, 0, 0, 2, c5t);
    if (!RANDOM_READY) begin
      check("taint adds no cycles", c5t == c5);
      n_same_cycles++;
    end
    for (int t = 0; t < 6; t++)
      run($urandom_range(0, DEPTH), $urandom(), 1'b1, TW'($urandom() & $urandom() & $urandom()), z, z, z,
          32'h1, 32'hFFFF_FFFF, 32'h0, 0, 0, $urandom_range(0, 3), cy);
    run(DEPTH, $urandom(), 1'b1, z, z, z, z, 32'h1, 32'hFFFF_FFFF, 32'h0, 0, 0, 1, cy);
    // 4. tainted loop bound
    run(3, 32'h1, 1'b1, z, ones, z, z, 32'h1, 32'hFFFF_FFFF, 32'h0, 1, 0, 0, cy);  // every transition checked
    n_branch_halt++;
    run(3, 32'h1, 1'b1, z, ones, z, z, 32'h0200, 32'hFFFF_FFFF, 32'h0, 1, 1, 0, cy); // loop 2 critical
    n_branch_halt++;
    run(3, 32'h1, 1'b1, z, ones, z, z, 32'h0000, 32'hFFFF_FFFF, 32'h0, 0, 0, 0, cy); // not critical
    n_noncritical_pass++;
    // 5. tainted source pointer, lowest tag bit only: strict protection halts at the load
    run(3, 32'h7, 1'b1, z, z, lowbit, z, 32'h1, 32'hFFFF_FFFF, 32'h0, 2, 0, 0, cy);
    n_mem_halt++;
    // 6. destination pointer with its lowest tag bit set, permissive protection
    //    (only the upper half of the address checked): passes with bit and byte
    //    tags, halts at the store with a variable tag, which covers every bit
    if (GRAN == GRAN_VAR) begin
      run(3, 32'h7, 1'b1, z, z, z, lowbit, 32'h1, 32'hFFFF_0000, 32'h0, 2, 1, 0, cy);
      n_mem_halt++;
    end else begin
      run(3, 32'h7, 1'b1, z, z, z, lowbit, 32'h1, 32'hFFFF_0000, 32'h0, 0, 0, 0, cy);
      n_permissive_pass++;
    end
    run(3, 32'h7, 1'b1, z, z, z, ones, 32'h1, 32'hFFFF_0000, 32'h0, 2, 1, 0, cy);    // upper bits tainted: halts
    // the same low-bit taint under the permissive mask, but the destination
    // pointer (id 1) marked critical: checked on every bit, halts at the store
    crit_ptrs = 32'h2;
    run(3, 32'h7, 1'b1, z, z, z, lowbit, 32'h1, 32'hFFFF_0000, 32'h0, 2, 1, 0, cy);
    n_critical_ptr_halt++;
    crit_ptrs = '0;
    n_mem_halt++;
    run(3, 32'h7, 1'b1, z, z, z, ones, 32'h1, 32'hFFFF_FFFF, 32'h2, 0, 0, 0, cy);    // benign pointer
    n_benign_pass++;
    // mechanisms that must have happened
    check("clean run seen", n_clean > 0);
    check("propagation seen", n_propagated > 0);
    check("tainted-by-default halt seen", n_default_halt > 0);
    check("tainted transition halt seen", n_branch_halt > 0);
    check("non-critical tainted transition passed", n_noncritical_pass > 0);
    check("tainted address halt seen", n_mem_halt > 0);
    if (GRAN != GRAN_VAR) check("permissive memory protection passed", n_permissive_pass > 0);
    check("benign pointer passed", n_benign_pass > 0);
    check("critical pointer halt seen", n_critical_ptr_halt > 0);
    check("interrupt clear and restart seen", n_recover > 0);
    if (!TAINT_BUS) check("serialized operations seen", n_serial_ops > 0);
    if (!RANDOM_READY) check("cycle comparison done", n_same_cycles > 0);
    $display("[gran=%0d taint_bus=%0d shared_spm=%0d] clean=%0d propagated=%0d default_halt=%0d branch_halt=%0d noncritical_pass=%0d mem_halt=%0d permissive_pass=%0d benign_pass=%0d recover=%0d serialized_ops=%0d cycles/elem=%0d",
             GRAN, TAINT_BUS, SPM_SHARED, n_clean, n_propagated, n_default_halt, n_branch_halt,
             n_noncritical_pass, n_mem_halt, n_permissive_pass, n_benign_pass, n_recover, n_serial_ops, per_elem_cycles);
    finished = 1;
  end
endmodule
