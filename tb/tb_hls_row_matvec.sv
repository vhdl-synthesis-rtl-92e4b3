// tb_hls_row_matvec: runs the row design at N=8 (no extra stage, result in
// N clocks) and N=16 (extra adder-tree register, N+1 clocks), three
// operations each, through row_matvec_harness.
module tb_hls_row_matvec;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1;
  int c8, f8, e8, c16, f16, e16;
  logic d8, d16;
  int checks, failures;

  row_matvec_harness #(.N(8))  h8  (.clk, .rst, .checks(c8),  .failures(f8),  .extra_stage_runs(e8),  .finished(d8));
  row_matvec_harness #(.N(16)) h16 (.clk, .rst, .checks(c16), .failures(f16), .extra_stage_runs(e16), .finished(d16));

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (d8 && d16);
    checks = c8 + c16 + 1;
    failures = f8 + f16;
    if (e16 == 0 || e8 != 0) begin failures++; $display("FAIL extra stage usage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16, f8 + f16 + 1);
    $finish;
  end
endmodule
