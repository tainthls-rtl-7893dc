// tb_taint_reg: checks that value and tag are reset to their parameters, are
// written together by the one write enable and hold otherwise.
module tb_taint_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [15:0] d, q;
  logic [1:0]  dt, qt;
  logic [15:0] mq;
  logic [1:0]  mqt;
  always #5 clk = ~clk;
  taint_reg #(.W(16), .TW(2), .RST_VAL(16'h1234), .RST_TAG(2'b11)) dut (
    .clk, .rst_n, .we, .d, .dt, .q, .qt);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; dt = '0;
    #12;
    check("reset value", q == 16'h1234);
    check("reset tag (tainted)", qt == 2'b11);
    rst_n = 1;
    mq = 16'h1234; mqt = 2'b11;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = 1'($urandom());
      d  = 16'($urandom());
      dt = 2'($urandom());
      if (we) begin mq = d; mqt = dt; end
      @(posedge clk); #1;
      check($sformatf("value t=%0d", t), q == mq);
      check($sformatf("tag t=%0d", t), qt == mqt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
