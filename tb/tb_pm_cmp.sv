// tb_pm_cmp: self-checking test of the comparator propagation module.
// At bit level (W = 8) and byte level (W = 16) the result tag must be exactly
// "some assignment of the tainted bits flips the outcome", found by trying
// assignments (all of them when few). At variable level it is the OR of the tags.
module tb_pm_cmp;
  import dift_pkg::*;
  int checks = 0, failures = 0;

  cmp_op_e    op;
  logic [7:0] a8, b8, at8, bt8;
  logic       yt_bit;
  pm_cmp #(.GRAN(GRAN_BIT), .W(8)) dut_bit (.op(op), .a(a8), .b(b8), .at(at8), .bt(bt8), .yt(yt_bit));
  logic [15:0] a16, b16;
  logic [1:0]  at16, bt16;
  logic        yt_byte;
  pm_cmp #(.GRAN(GRAN_BYTE), .W(16)) dut_byte (.op(op), .a(a16), .b(b16), .at(at16), .bt(bt16), .yt(yt_byte));
  logic atv, btv, yt_var;
  pm_cmp #(.GRAN(GRAN_VAR), .W(8)) dut_var (.op(op), .a(a8), .b(b8), .at(atv), .bt(btv), .yt(yt_var));

  function automatic logic cmp(cmp_op_e o, logic [15:0] x, logic [15:0] y);
    case (o)
      COP_EQ:  return x == y;
      COP_NE:  return x != y;
      COP_LTU: return x < y;
      default: return x >= y;
    endcase
  endfunction

  // can the outcome change? exhaustive for up to 16 free bits, else sampled
  // together with the extreme assignments
  function automatic logic flips(cmp_op_e o, logic [15:0] x, logic [15:0] y,
                                 logic [15:0] ma, logic [15:0] mb);
    logic        base;
    logic [31:0] m, s;
    base = cmp(o, x, y);
    m = {mb, ma};
    if ($countones(m) <= 16) begin
      s = '0;
      do begin
        if (cmp(o, (x & ~ma) | s[15:0], (y & ~mb) | s[31:16]) != base) return 1'b1;
        s = (s - m) & m;
      end while (s != 0);
      return 1'b0;
    end
    if (cmp(o, x & ~ma, y | mb) != base) return 1'b1;
    if (cmp(o, x | ma, y & ~mb) != base) return 1'b1;
    if (cmp(o, (x & ~ma) | (y & ma & ~mb), (y & ~mb) | (x & mb & ~ma)) != base) return 1'b1;
    for (int k = 0; k < 3000; k++) begin
      s = {$urandom(), $urandom()} & m;
      if (cmp(o, (x & ~ma) | s[15:0], (y & ~mb) | s[31:16]) != base) return 1'b1;
    end
    return 1'b0;
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
    logic exp;
    // hand-worked: i < n with i = 3 untainted, n = 0x80 with bit 0 tainted: always true
    op = COP_LTU; a8 = 8'd3; at8 = 8'h00; b8 = 8'h80; bt8 = 8'h01; #1;
    check("LTU outcome fixed -> untainted", yt_bit == 1'b0);
    b8 = 8'h04; bt8 = 8'h04; #1;   // n in {0,4}
    check("LTU outcome depends on tainted bit", yt_bit == 1'b1);
    op = COP_EQ; a8 = 8'h10; b8 = 8'h01; at8 = 8'h01; bt8 = 8'h00; #1;
    check("EQ decided by untainted bit 4", yt_bit == 1'b0);
    for (int t = 0; t < 800; t++) begin
      op  = cmp_op_e'($urandom_range(0, 3));
      a8  = 8'($urandom()); b8 = 8'($urandom());
      if ($urandom_range(0, 1)) b8 = a8 ^ 8'(1 << $urandom_range(0, 7));
      at8 = 8'($urandom() & $urandom()); bt8 = 8'($urandom() & $urandom() & $urandom());
      a16 = 16'($urandom()); b16 = 16'($urandom());
      if ($urandom_range(0, 1)) b16 = {b16[15:8], a16[7:0]};
      at16 = 2'($urandom()); bt16 = 2'($urandom());
      atv = 1'($urandom()); btv = 1'($urandom());
      #1;
      exp = flips(op, 16'(a8), 16'(b8), 16'(at8), 16'(bt8));
      check($sformatf("bit op=%0d a=%h b=%h at=%h bt=%h yt=%b", op, a8, b8, at8, bt8, yt_bit), yt_bit == exp);
      exp = flips(op, a16, b16, {{8{at16[1]}}, {8{at16[0]}}}, {{8{bt16[1]}}, {8{bt16[0]}}});
      check($sformatf("byte op=%0d a=%h b=%h at=%b bt=%b yt=%b", op, a16, b16, at16, bt16, yt_byte), yt_byte == exp);
      check("var", yt_var == (atv | btv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
