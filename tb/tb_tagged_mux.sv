// tb_tagged_mux: checks that data and tag come from the same selected input.
module tb_tagged_mux;
  int checks = 0, failures = 0;
  logic [1:0]            sel;
  logic [2:0][15:0]      d;
  logic [2:0][3:0]       dt;
  logic [15:0]           y;
  logic [3:0]            yt;
  tagged_mux #(.W(16), .TW(4), .N(3)) dut (.sel, .d, .dt, .y, .yt);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int t = 0; t < 400; t++) begin
      s = $urandom_range(0, 3);
      sel = 2'(s);
      for (int k = 0; k < 3; k++) begin
        d[k]  = 16'($urandom());
        dt[k] = 4'($urandom());
      end
      #1;
      if (s < 3) begin
        check($sformatf("data sel=%0d", s), y == d[s]);
        check($sformatf("tag sel=%0d", s), yt == dt[s]);
      end else begin
        check("out of range data", y == d[0]);
        check("out of range tag", yt == dt[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
