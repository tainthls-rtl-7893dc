// tb_taint_spm: random reads and writes on both layouts (separate taint
// memory and shared dual-port memory) against a reference model; checks that
// tag and data come back together one cycle after the read.
module tb_taint_spm;
  int checks = 0, failures = 0;
  localparam int DEPTH = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        en, we;
  logic [3:0]  addr;
  logic [31:0] wdata, rd0, rd1;
  logic [3:0]  wtag, rt0, rt1;
  taint_spm #(.W(32), .TW(4), .DEPTH(DEPTH), .SHARED(1'b0)) dut_sep (
    .clk, .en, .we, .addr, .wdata, .wtag, .rdata(rd0), .rtag(rt0));
  taint_spm #(.W(32), .TW(4), .DEPTH(DEPTH), .SHARED(1'b1)) dut_shr (
    .clk, .en, .we, .addr, .wdata, .wtag, .rdata(rd1), .rtag(rt1));

  logic [31:0] md [DEPTH];
  logic [3:0]  mt [DEPTH];
  logic        valid [DEPTH];

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    en = 0; we = 0; addr = '0; wdata = '0; wtag = '0;
    // fill every location first (memories are not reset)
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 4'(k); wdata = 32'($urandom()); wtag = 4'($urandom());
      md[k] = wdata; mt[k] = wtag;
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      a = $urandom_range(0, DEPTH - 1);
      en = 1; addr = 4'(a); we = 1'($urandom());
      wdata = 32'($urandom()); wtag = 4'($urandom());
      if (!we) begin
        @(posedge clk); #1;
        check($sformatf("sep data a=%0d", a), rd0 == md[a]);
        check($sformatf("sep tag a=%0d", a), rt0 == mt[a]);
        check($sformatf("shared data a=%0d", a), rd1 == md[a]);
        check($sformatf("shared tag a=%0d", a), rt1 == mt[a]);
      end else begin
        md[a] = wdata; mt[a] = wtag;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
