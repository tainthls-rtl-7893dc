// tb_mix_fn: calls the mix submodule at all three granularities side by side
// with random parameters and tags. Checks the return value against
// x ^ (x >> 16), the return tag against tags worked out by hand for this
// function (bit: tag[k] | tag[k+16] for the low half, tag[k] above; byte: the
// same by bytes; variable: the parameter's tag), done two cycles after start,
// the one-cycle done pulse and busy.
module tb_mix_fn;
  import dift_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start;
  logic [31:0] x;
  logic [31:0] xt_bit;
  logic [3:0]  xt_byte;
  logic        xt_var;
  logic        busy [3], done [3];
  logic [31:0] ret [3];
  logic [31:0] rt_bit;
  logic [3:0]  rt_byte;
  logic        rt_var;

  mix_fn #(.GRAN(GRAN_BIT),  .W(32)) u_bit  (.clk, .rst_n, .start, .x, .x_tag(xt_bit),
    .busy(busy[0]), .done(done[0]), .ret(ret[0]), .ret_tag(rt_bit));
  mix_fn #(.GRAN(GRAN_BYTE), .W(32)) u_byte (.clk, .rst_n, .start, .x, .x_tag(xt_byte),
    .busy(busy[1]), .done(done[1]), .ret(ret[1]), .ret_tag(rt_byte));
  mix_fn #(.GRAN(GRAN_VAR),  .W(32)) u_var  (.clk, .rst_n, .start, .x, .x_tag(xt_var),
    .busy(busy[2]), .done(done[2]), .ret(ret[2]), .ret_tag(rt_var));

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
    logic [31:0] ex, ebt;
    logic [3:0]  eyt;
    int          lat;
    logic        evt;
    start = 0; x = '0; xt_bit = '0; xt_byte = '0; xt_var = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      x = $urandom();
      xt_bit  = (t % 4 == 0) ? 32'(1 << $urandom_range(0, 31)) : ($urandom() & $urandom());
      xt_byte = 4'($urandom());
      xt_var  = 1'($urandom());
      ex = x ^ (x >> 16);
      evt = xt_var;
      for (int k = 0; k < 32; k++) ebt[k] = xt_bit[k] | ((k < 16) ? xt_bit[k + 16] : 1'b0);
      for (int j = 0; j < 4; j++)  eyt[j] = xt_byte[j] | ((j < 2) ? xt_byte[j + 2] : 1'b0);
      check("idle before the call", !busy[0] && !busy[1] && !busy[2]);
      start = 1;
      @(negedge clk);
      start = 0;
      // the caller may change its registers once the call has started
      x = $urandom(); xt_bit = $urandom(); xt_byte = 4'($urandom()); xt_var = 1'($urandom());
      lat = 1;
      while (!done[0]) begin
        check("busy during the call", busy[0] && busy[1] && busy[2]);
        @(negedge clk); lat++;
        if (lat > 10) break;
      end
      check($sformatf("done two cycles after start (%0d)", lat), lat == 2);
      check("all granularities finish together", done[1] && done[2]);
      for (int g = 0; g < 3; g++) check($sformatf("return value g=%0d", g), ret[g] == ex);
      check("bit-level return tag", rt_bit == ebt);
      check("byte-level return tag", rt_byte == eyt);
      check("variable-level return tag", rt_var == evt);
      @(negedge clk);
      check("done lasts one cycle", !done[0] && !done[1] && !done[2]);
      check("return value held after done", ret[0] == ex && rt_bit == ebt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
