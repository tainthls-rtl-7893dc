// tb_security_manager: drives random branch and memory events under random
// policies and compares `violation` with an independent model of the policy;
// critical pointers are checked on every address bit and benign ones never;
// checks that the interrupt is raised, holds its first cause and id, and is
// cleared by irq_clear.
module tb_security_manager;
  import dift_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        br_valid, br_tag, mem_valid, br_check_all, irq_clear;
  logic [2:0]  br_id, mem_id, cause_id;
  logic [15:0] mem_addr_taint, mem_check_mask;
  logic [7:0]  br_critical, mem_critical, mem_benign;
  logic        violation, irq;
  cause_e      cause;

  security_manager #(.AW(16), .NID(8)) dut (
    .clk, .rst_n, .br_valid, .br_id, .br_tag, .mem_valid, .mem_id, .mem_addr_taint,
    .br_check_all, .br_critical, .mem_check_mask, .mem_critical, .mem_benign, .irq_clear,
    .violation, .irq, .cause, .cause_id);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_br, exp_mem, m_irq;
    cause_e m_cause;
    logic [2:0] m_id;
    int n_br = 0, n_mem = 0, n_permissive_pass = 0, n_critical_strict = 0;
    {br_valid, br_tag, mem_valid, br_check_all, irq_clear} = '0;
    br_id = '0; mem_id = '0; mem_addr_taint = '0; mem_check_mask = '1;
    br_critical = '0; mem_critical = '0; mem_benign = '0;
    m_irq = 0; m_cause = CAUSE_NONE; m_id = '0;
    repeat (2) @(posedge clk);
    #1 check("reset: no interrupt", irq == 1'b0);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      br_valid = 1'($urandom()); br_id = 3'($urandom()); br_tag = 1'($urandom());
      mem_valid = ($urandom_range(0, 2) == 0); mem_id = 3'($urandom());
      mem_addr_taint = ($urandom_range(0, 1)) ? 16'(1 << $urandom_range(0, 15)) : 16'h0;
      br_check_all = ($urandom_range(0, 3) == 0);
      br_critical = 8'($urandom());
      mem_check_mask = ($urandom_range(0, 1)) ? 16'hFFFF : 16'hFF00;   // strict or permissive
      mem_benign = 8'($urandom() & $urandom());
      mem_critical = 8'($urandom() & $urandom());
      irq_clear = ($urandom_range(0, 7) == 0);
      #1;
      exp_br  = br_valid && br_tag && (br_check_all || br_critical[br_id]);
      exp_mem = mem_valid && !mem_benign[mem_id] &&
                (mem_critical[mem_id] ? mem_addr_taint != 0 : (mem_addr_taint & mem_check_mask) != 0);
      if (mem_valid && !mem_benign[mem_id] && mem_addr_taint != 0 && !exp_mem) n_permissive_pass++;
      if (exp_mem && mem_critical[mem_id] && (mem_addr_taint & mem_check_mask) == 0) n_critical_strict++;
      check("violation", violation == (exp_br || exp_mem));
      if (exp_br) n_br++;
      if (exp_mem) n_mem++;
      @(posedge clk);
      if ((exp_br || exp_mem) && !m_irq) begin
        m_irq = 1; m_cause = exp_br ? CAUSE_BRANCH : CAUSE_MEMORY; m_id = exp_br ? br_id : mem_id;
      end else if (irq_clear) begin
        m_irq = 0; m_cause = CAUSE_NONE; m_id = '0;
      end
      #1;
      check("irq", irq == m_irq);
      check("cause", cause == m_cause);
      check("cause id", cause_id == m_id);
    end
    check("branch violations seen", n_br > 0);
    check("memory violations seen", n_mem > 0);
    check("permissive policy let a low-bit taint pass", n_permissive_pass > 0);
    check("critical pointer caught a low-bit taint under the permissive mask", n_critical_strict > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
