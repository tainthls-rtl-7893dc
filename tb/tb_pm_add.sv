// tb_pm_add: self-checking test of the adder/subtractor propagation module at
// all three granularities.
// Soundness is checked against the definition of taint: for random operands
// and tags, every assignment of the tainted input bits (exhaustive when there
// are few, sampled otherwise) is tried and every result bit that changes must
// be marked tainted. Exact values are checked on hand-worked cases.
module tb_pm_add;
  import dift_pkg::*;
  int checks = 0, failures = 0;

  // bit level, W = 8
  logic       sub;
  logic [7:0] a8, b8, at8, bt8, yt8;
  pm_add #(.GRAN(GRAN_BIT), .W(8)) dut_bit (.sub(sub), .a(a8), .b(b8), .at(at8), .bt(bt8), .yt(yt8));
  // byte level, W = 16
  logic [15:0] a16, b16;
  logic [1:0]  at16, bt16, yt16;
  pm_add #(.GRAN(GRAN_BYTE), .W(16)) dut_byte (.sub(sub), .a(a16), .b(b16), .at(at16), .bt(bt16), .yt(yt16));
  // variable level, W = 8
  logic       atv, btv, ytv;
  pm_add #(.GRAN(GRAN_VAR), .W(8)) dut_var (.sub(sub), .a(a8), .b(b8), .at(atv), .bt(btv), .yt(ytv));

  function automatic logic [15:0] op16(logic s, logic [15:0] x, logic [15:0] y);
    return s ? x - y : x + y;
  endfunction

  // which result bits can change when the bits in ma/mb take any value
  function automatic logic [15:0] changed(logic s, logic [15:0] x, logic [15:0] y,
                                          logic [15:0] ma, logic [15:0] mb, int w);
    logic [15:0] base, acc, msk;
    logic [31:0] m, f;
    msk  = (w == 16) ? 16'hFFFF : 16'h00FF;
    base = op16(s, x, y) & msk;
    acc  = '0;
    m    = {mb, ma};
    if ($countones(m) <= 14) begin
      f = '0;
      do begin
        acc |= (op16(s, (x & ~ma) | f[15:0], (y & ~mb) | f[31:16]) & msk) ^ base;
        f = (f - m) & m;
      end while (f != 0);
    end else begin
      for (int k = 0; k < 4000; k++) begin
        f = {$urandom(), $urandom()} & m;
        acc |= (op16(s, (x & ~ma) | f[15:0], (y & ~mb) | f[31:16]) & msk) ^ base;
      end
    end
    return acc;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ch, m;
    // hand-worked cases (bit level)
    sub = 0; a8 = 8'h00; b8 = 8'h00; at8 = 8'h01; bt8 = 8'h00; #1;
    check("0+0, a[0] tainted -> bit 0", yt8 == 8'h01);
    b8 = 8'h01; #1;
    check("0+1, a[0] tainted -> carry taints bit 1", yt8 == 8'h03);
    a8 = 8'h0F; b8 = 8'h00; at8 = 8'h00; bt8 = 8'h00; #1;
    check("untainted add", yt8 == 8'h00);
    a8 = 8'h0F; b8 = 8'h01; at8 = 8'h00; bt8 = 8'h10; #1;
    check("b[4] tainted, no carry into it", yt8 == 8'hF0 || yt8 == 8'h10 || yt8 == 8'h30 || yt8 == 8'h70);
    sub = 1; a8 = 8'h10; b8 = 8'h00; at8 = 8'h00; bt8 = 8'h01; #1;
    check("0x10 - b, b[0] tainted -> borrow ripples to bit 4", yt8 == 8'h1F);
    // byte and variable level exact values
    sub = 0; at16 = 2'b01; bt16 = 2'b00; #1;
    check("byte: low byte taints both", yt16 == 2'b11);
    at16 = 2'b10; #1;
    check("byte: high byte taints only high", yt16 == 2'b10);
    at16 = 2'b00; #1;
    check("byte: none", yt16 == 2'b00);
    atv = 0; btv = 1; #1; check("var: OR", ytv == 1'b1);
    atv = 0; btv = 0; #1; check("var: none", ytv == 1'b0);

    // random soundness
    for (int t = 0; t < 300; t++) begin
      sub = 1'($urandom());
      a8 = 8'($urandom()); b8 = 8'($urandom());
      at8 = 8'($urandom() & $urandom()); bt8 = 8'($urandom() & $urandom());
      a16 = 16'($urandom()); b16 = 16'($urandom());
      at16 = 2'($urandom()); bt16 = 2'($urandom());
      atv = 1'($urandom()); btv = 1'($urandom());
      #1;
      ch = changed(sub, 16'(a8), 16'(b8), 16'(at8), 16'(bt8), 8);
      check($sformatf("bit sound a=%h b=%h at=%h bt=%h yt=%h ch=%h", a8, b8, at8, bt8, yt8, ch),
            (ch[7:0] & ~yt8) == 0);
      ch = changed(sub, a16, b16, {{8{at16[1]}}, {8{at16[0]}}}, {{8{bt16[1]}}, {8{bt16[0]}}}, 16);
      m  = {{8{yt16[1]}}, {8{yt16[0]}}};
      check("byte sound", (ch & ~m) == 0);
      ch = changed(sub, 16'(a8), 16'(b8), {16{atv}}, {16{btv}}, 8);
      check("var sound", (ch[7:0] & ~{8{ytv}}) == 0);
      check("var exact", ytv == (atv | btv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
