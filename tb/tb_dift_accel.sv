// tb_dift_accel: end-to-end test of the DIFT-enhanced accelerator in four
// configurations side by side: bit-level tags with the serializer (the
// default), byte-level tags with a dedicated taint bus and the shared-memory
// scratchpad layout, variable-level tags with a dedicated taint bus, and
// bit-level tags with the serializer, tags in a separate memory region and a
// randomly stalling bus. It also
// checks that the serializer's extra cost per element is exactly one more bus
// transaction: with the memory model used here a transaction occupies the bus
// for 5 cycles (accept, 3 cycles latency, response), so the per-element cost
// with the serializer must exceed that with a dedicated taint bus by 5.
module tb_dift_accel;
  import dift_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c[4], f[4], pe[4];
  logic fin[4];
  int checks, failures;

  tb_dift_accel_env #(.GRAN(GRAN_BIT),  .TAINT_BUS(1'b0), .SPM_SHARED(1'b0), .DEPTH(32)) e0 (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]), .per_elem_cycles(pe[0]));
  tb_dift_accel_env #(.GRAN(GRAN_BYTE), .TAINT_BUS(1'b1), .SPM_SHARED(1'b1), .DEPTH(32)) e1 (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]), .per_elem_cycles(pe[1]));
  tb_dift_accel_env #(.GRAN(GRAN_VAR),  .TAINT_BUS(1'b1), .SPM_SHARED(1'b0), .DEPTH(32)) e2 (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]), .per_elem_cycles(pe[2]));
  tb_dift_accel_env #(.GRAN(GRAN_BIT),  .TAINT_BUS(1'b0), .SPM_SHARED(1'b0), .DEPTH(16), .RANDOM_READY(1'b1),
                      .INTERLEAVE(1'b0)) e3 (
    .clk, .rst_n, .checks(c[3]), .failures(f[3]), .finished(fin[3]), .per_elem_cycles(pe[3]));

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks   = c[0] + c[1] + c[2] + c[3] + 1;
    failures = f[0] + f[1] + f[2] + f[3];
    // memory model: one transaction costs LAT + 2 = 5 cycles when the bus is free
    if (pe[0] - pe[2] != 5) begin
      failures++;
      $display("FAIL serializer overhead per element %0d, expected 5", pe[0] - pe[2]);
    end
    $display("cycles per element: serialized %0d, dedicated taint bus %0d", pe[0], pe[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
