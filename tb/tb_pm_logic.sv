// tb_pm_logic: self-checking test of the AND/OR/XOR propagation module.
// At bit level the module must be exact: its tag must equal the set of result
// bits that some assignment of the tainted input bits can change, found here by
// trying every assignment. At byte and variable level the tag must be the OR
// of the operand tags.
module tb_pm_logic;
  import dift_pkg::*;
  int checks = 0, failures = 0;

  logic_op_e  op;
  logic [7:0] a8, b8, at8, bt8, yt8;
  pm_logic #(.GRAN(GRAN_BIT), .W(8)) dut_bit (.op(op), .a(a8), .b(b8), .at(at8), .bt(bt8), .yt(yt8));
  logic [15:0] a16, b16;
  logic [1:0]  at16, bt16, yt16;
  pm_logic #(.GRAN(GRAN_BYTE), .W(16)) dut_byte (.op(op), .a(a16), .b(b16), .at(at16), .bt(bt16), .yt(yt16));
  logic atv, btv, ytv;
  pm_logic #(.GRAN(GRAN_VAR), .W(8)) dut_var (.op(op), .a(a8), .b(b8), .at(atv), .bt(btv), .yt(ytv));

  function automatic logic [7:0] f(logic_op_e o, logic [7:0] x, logic [7:0] y);
    case (o)
      LOP_AND: return x & y;
      LOP_OR:  return x | y;
      default: return x ^ y;
    endcase
  endfunction

  function automatic logic [7:0] changed(logic_op_e o, logic [7:0] x, logic [7:0] y,
                                         logic [7:0] ma, logic [7:0] mb);
    logic [7:0]  base, acc;
    logic [15:0] m, s;
    base = f(o, x, y);
    acc  = '0;
    m    = {mb, ma};
    s    = '0;
    do begin
      acc |= f(o, (x & ~ma) | s[7:0], (y & ~mb) | s[15:8]) ^ base;
      s = (s - m) & m;
    end while (s != 0);
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
    // hand-worked cases
    op = LOP_AND; a8 = 8'h0F; at8 = 8'h00; b8 = 8'h00; bt8 = 8'hFF; #1;
    check("AND: known 1s pass the tainted bits", yt8 == 8'h0F);
    op = LOP_OR; #1;
    check("OR: known 1s mask the tainted bits", yt8 == 8'hF0);
    op = LOP_XOR; #1;
    check("XOR: every tainted bit", yt8 == 8'hFF);
    for (int t = 0; t < 600; t++) begin
      op  = logic_op_e'($urandom_range(0, 2));
      a8  = 8'($urandom()); b8 = 8'($urandom());
      at8 = 8'($urandom()); bt8 = 8'($urandom());
      a16 = 16'($urandom()); b16 = 16'($urandom());
      at16 = 2'($urandom()); bt16 = 2'($urandom());
      atv = 1'($urandom()); btv = 1'($urandom());
      #1;
      check($sformatf("bit exact op=%0d a=%h b=%h at=%h bt=%h yt=%h", op, a8, b8, at8, bt8, yt8),
            yt8 == changed(op, a8, b8, at8, bt8));
      check("byte", yt16 == (at16 | bt16));
      check("var", ytv == (atv | btv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
