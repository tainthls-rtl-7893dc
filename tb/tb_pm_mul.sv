// tb_pm_mul: self-checking test of the multiplier propagation module.
// Soundness against the definition of taint (every result bit that an
// assignment of the tainted bits changes must be marked), exact values on
// hand-worked cases, and the byte/variable rules.
module tb_pm_mul;
  import dift_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0] a8, b8, at8, bt8, yt8;
  pm_mul #(.GRAN(GRAN_BIT), .W(8)) dut_bit (.a(a8), .b(b8), .at(at8), .bt(bt8), .yt(yt8));
  logic [15:0] a16, b16;
  logic [1:0]  at16, bt16, yt16;
  pm_mul #(.GRAN(GRAN_BYTE), .W(16)) dut_byte (.a(a16), .b(b16), .at(at16), .bt(bt16), .yt(yt16));
  logic atv, btv, ytv;
  pm_mul #(.GRAN(GRAN_VAR), .W(8)) dut_var (.a(a8), .b(b8), .at(atv), .bt(btv), .yt(ytv));

  function automatic logic [15:0] changed(logic [15:0] x, logic [15:0] y,
                                          logic [15:0] ma, logic [15:0] mb, logic [15:0] msk);
    logic [15:0] base, acc;
    logic [31:0] m, s;
    base = (x * y) & msk;
    acc = '0;
    m = {mb, ma};
    if ($countones(m) <= 14) begin
      s = '0;
      do begin
        acc |= (((x & ~ma) | s[15:0]) * ((y & ~mb) | s[31:16]) & msk) ^ base;
        s = (s - m) & m;
      end while (s != 0);
    end else
      for (int k = 0; k < 4000; k++) begin
        s = {$urandom(), $urandom()} & m;
        acc |= (((x & ~ma) | s[15:0]) * ((y & ~mb) | s[31:16]) & msk) ^ base;
      end
    return acc;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ch;
    a8 = 8'h00; b8 = 8'h55; at8 = 8'h00; bt8 = 8'hFF; #1;
    check("known-zero operand gives untainted product", yt8 == 8'h00);
    a8 = 8'h04; at8 = 8'h00; b8 = 8'h00; bt8 = 8'h01; #1;
    check("4 * b[0] taints from bit 2 up only", (yt8 & 8'h03) == 8'h00 && yt8[2]);
    a8 = 8'h1F; at8 = 8'h00; b8 = 8'h00; bt8 = 8'h00; #1;
    check("untainted", yt8 == 8'h00);
    at16 = 2'b01; bt16 = 2'b00; #1; check("byte prefix", yt16 == 2'b11);
    at16 = 2'b10; #1; check("byte high only", yt16 == 2'b10);
    for (int t = 0; t < 300; t++) begin
      a8 = 8'($urandom()); b8 = 8'($urandom());
      if ($urandom_range(0, 3) == 0) b8 = '0;
      at8 = 8'($urandom() & $urandom()); bt8 = 8'($urandom() & $urandom() & $urandom());
      a16 = 16'($urandom()); b16 = 16'($urandom());
      at16 = 2'($urandom()); bt16 = 2'($urandom());
      atv = 1'($urandom()); btv = 1'($urandom());
      #1;
      ch = changed(16'(a8), 16'(b8), 16'(at8), 16'(bt8), 16'h00FF);
      check($sformatf("bit sound a=%h b=%h at=%h bt=%h yt=%h ch=%h", a8, b8, at8, bt8, yt8, ch),
            (ch[7:0] & ~yt8) == 0);
      ch = changed(a16, b16, {{8{at16[1]}}, {8{at16[0]}}}, {{8{bt16[1]}}, {8{bt16[0]}}}, 16'hFFFF);
      check("byte sound", (ch & ~{{8{yt16[1]}}, {8{yt16[0]}}}) == 0);
      check("byte exact", yt16 == {|{at16, bt16}, at16[0] | bt16[0]});
      check("var", ytv == (atv | btv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
