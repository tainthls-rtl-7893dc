// tb_cfg_regs: checks reset values (parameter and return tags all ones, strict
// policy), register writes and read-back, start/irq_clear pulses, STATUS and
// capture of the return value and tag.
module tb_cfg_regs;
  import dift_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_we;
  logic [4:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic        start, irq_clear, br_check_all, busy, done, irq, ret_we;
  logic [31:0] src, dst, n, key, mem_check_mask, ret;
  logic [3:0]  src_tag, dst_tag, n_tag, key_tag, ret_tag;
  logic [7:0]  br_critical, mem_critical, mem_benign, cause_id;
  cause_e      cause;

  cfg_regs #(.W(32), .TW(4), .NID(8)) dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 5'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // combinational read of one register: rv holds the value
  logic [31:0] rv;
  task automatic rd(int a);
    cfg_addr = 5'(a);
    #1;
    rv = cfg_rdata;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    int pulses;
    cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    busy = 0; done = 0; irq = 0; cause = CAUSE_NONE; cause_id = '0; ret_we = 0; ret = '0; ret_tag = '0;
    repeat (2) @(posedge clk); #1;
    check("src tag resets tainted", src_tag == 4'hF);
    check("dst tag resets tainted", dst_tag == 4'hF);
    check("n tag resets tainted", n_tag == 4'hF);
    check("key tag resets tainted", key_tag == 4'hF);
    rd(REG_RET_TAG); check("ret tag resets tainted", rv == 32'hF);
    check("strict memory policy at reset", mem_check_mask == 32'hFFFF_FFFF);
    check("check every transition at reset", br_check_all == 1'b1);
    check("no critical or benign pointer at reset", mem_critical == '0 && mem_benign == '0);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      v = $urandom();
      wr(REG_SRC, v); rd(REG_SRC);     check("src", src == v && rv == v);
      wr(REG_DST, v + 1); rd(REG_DST); check("dst", dst == v + 1 && rv == v + 1);
      wr(REG_N, v + 2); rd(REG_N);   check("n", n == v + 2 && rv == v + 2);
      wr(REG_KEY, v + 3); check("key", key == v + 3);
      wr(REG_SRC_TAG, v); rd(REG_SRC_TAG); check("src tag", src_tag == v[3:0] && rv == 32'(v[3:0]));
      wr(REG_DST_TAG, v >> 4); check("dst tag", dst_tag == v[7:4]);
      wr(REG_N_TAG, v >> 8);   check("n tag", n_tag == v[11:8]);
      wr(REG_KEY_TAG, v >> 12); check("key tag", key_tag == v[15:12]);
      wr(REG_BR_POL, v);  check("branch policy", br_check_all == v[0] && br_critical == v[15:8]);
      wr(REG_MEM_POL, v); check("memory policy", mem_check_mask == v);
      wr(REG_MEM_BENIGN, v); check("benign", mem_benign == v[7:0]);
      wr(REG_MEM_CRIT, v >> 3); rd(REG_MEM_CRIT);
      check("critical pointers", mem_critical == v[10:3] && rv == 32'(v[10:3]));
    end
    // start pulse lasts one cycle
    pulses = 0;
    fork
      wr(REG_CTRL, 32'h1);
      repeat (4) begin @(posedge clk); #1; if (start) pulses++; end
    join
    check("one start pulse", pulses == 1);
    pulses = 0;
    fork
      wr(REG_CTRL, 32'h2);
      repeat (4) begin @(posedge clk); #1; if (irq_clear) pulses++; end
    join
    check("one irq_clear pulse", pulses == 1);
    // return value capture and status
    @(negedge clk); ret_we = 1; ret = 32'hCAFE_0001; ret_tag = 4'h5; done = 1; busy = 1;
    @(negedge clk); ret_we = 0; done = 0; ret = '0; ret_tag = '0;
    rd(REG_RET); check("ret", rv == 32'hCAFE_0001);
    rd(REG_RET_TAG); check("ret tag", rv == 32'h5);
    irq = 1; cause = CAUSE_MEMORY; cause_id = 8'd1;
    rd(REG_STATUS); check("status", rv == {16'd0, 8'd1, 2'd0, 2'd2, 1'b0, 1'b1, 1'b1, 1'b1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
