// tb_pm_shift: self-checking test of the shifter propagation module.
// With an untainted amount the tag must move with the data (exact at bit
// level, group-wise at byte and variable level, checked against every
// assignment of the tainted bits); a tainted amount must taint the whole result.
module tb_pm_shift;
  import dift_pkg::*;
  int checks = 0, failures = 0;

  shift_op_e   op;
  logic [15:0] a, b, at_bit, yt_bit;
  logic [1:0]  at_byte, bt_byte, yt_byte;
  logic        at_var, bt_var, yt_var;
  logic [15:0] bt_bit;
  pm_shift #(.GRAN(GRAN_BIT),  .W(16)) dut_bit  (.op(op), .a(a), .b(b), .at(at_bit),  .bt(bt_bit),  .yt(yt_bit));
  pm_shift #(.GRAN(GRAN_BYTE), .W(16)) dut_byte (.op(op), .a(a), .b(b), .at(at_byte), .bt(bt_byte), .yt(yt_byte));
  pm_shift #(.GRAN(GRAN_VAR),  .W(16)) dut_var  (.op(op), .a(a), .b(b), .at(at_var),  .bt(bt_var),  .yt(yt_var));

  function automatic logic [15:0] sh(shift_op_e o, logic [15:0] x, logic [3:0] s);
    return (o == SOP_SLL) ? x << s : x >> s;
  endfunction

  // bits that change when the bits in m take any value (sampled)
  function automatic logic [15:0] changed(shift_op_e o, logic [15:0] x, logic [15:0] m, logic [3:0] s);
    logic [15:0] acc, base;
    base = sh(o, x, s);
    acc = '0;
    for (int k = 0; k < 200; k++) acc |= sh(o, (x & ~m) | (16'($urandom()) & m), s) ^ base;
    acc |= sh(o, x | m, s) ^ base;
    acc |= sh(o, x & ~m, s) ^ base;
    return acc;
  endfunction

  function automatic logic [15:0] grow(logic [1:0] t);
    return {{8{t[1]}}, {8{t[0]}}};
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
    op = SOP_SLL; a = 16'h00FF; b = 16'd4; at_bit = 16'h0003; bt_bit = '0; #1;
    check("SLL moves tag bits", yt_bit == 16'h0030);
    op = SOP_SRL; #1;
    check("SRL shifts them out", yt_bit == 16'h0000);
    bt_bit = 16'h8000; #1;
    check("tainted amount taints all", yt_bit == 16'hFFFF);
    at_byte = 2'b01; bt_byte = 2'b00; op = SOP_SLL; b = 16'd8; #1;
    check("byte SLL 8: low byte tag moves up", yt_byte == 2'b10);
    b = 16'd3; #1;
    check("byte SLL 3: low byte spreads into both", yt_byte == 2'b11);
    for (int t = 0; t < 400; t++) begin
      op = shift_op_e'($urandom_range(0, 1));
      a = 16'($urandom());
      b = 16'($urandom_range(0, 15));
      at_bit = 16'($urandom() & $urandom());
      bt_bit = ($urandom_range(0, 3) == 0) ? 16'($urandom()) : '0;
      at_byte = 2'($urandom()); bt_byte = ($urandom_range(0, 3) == 0) ? 2'($urandom()) : '0;
      at_var = 1'($urandom()); bt_var = ($urandom_range(0, 3) == 0) ? 1'($urandom()) : '0;
      #1;
      if (bt_bit != 0) check("bit: tainted amount", yt_bit == 16'hFFFF);
      else check($sformatf("bit exact a=%h s=%0d at=%h", a, b, at_bit), yt_bit == sh(op, at_bit, b[3:0]));
      if (bt_byte != 0) check("byte: tainted amount", yt_byte == 2'b11);
      else begin
        ch = changed(op, a, grow(at_byte), b[3:0]);
        check("byte sound", (ch & ~grow(yt_byte)) == 0);
        check("byte exact", grow(yt_byte) == (grow(yt_byte) & {16{1'b1}}) &&
              yt_byte == {|sh(op, grow(at_byte), b[3:0])[15:8], |sh(op, grow(at_byte), b[3:0])[7:0]});
      end
      if (bt_var != 0) check("var: tainted amount", yt_var == 1'b1);
      else check("var", yt_var == (at_var && sh(op, 16'hFFFF, b[3:0]) != 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
