// tb_table1_sizes: runs the whole top at every evaluated size below the
// default (8, 16, 32, 64, 128; the default 256 is covered by
// tb_matvec_top) and checks results and clock counts per size: the row
// design takes N clocks at size 8 and N+1 from size 16, the column and
// recurrence designs take N clocks at every size.
module tb_table1_sizes;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int NS = 5;
  int ch [NS], fa [NS];
  logic fin [NS];
  int checks, failures;

  top_size_harness #(.N(8),   .ROW_CLOCKS(8))   h8   (.clk, .checks(ch[0]), .failures(fa[0]), .finished(fin[0]));
  top_size_harness #(.N(16),  .ROW_CLOCKS(17))  h16  (.clk, .checks(ch[1]), .failures(fa[1]), .finished(fin[1]));
  top_size_harness #(.N(32),  .ROW_CLOCKS(33))  h32  (.clk, .checks(ch[2]), .failures(fa[2]), .finished(fin[2]));
  top_size_harness #(.N(64),  .ROW_CLOCKS(65))  h64  (.clk, .checks(ch[3]), .failures(fa[3]), .finished(fin[3]));
  top_size_harness #(.N(128), .ROW_CLOCKS(129)) h128 (.clk, .checks(ch[4]), .failures(fa[4]), .finished(fin[4]));

  function automatic void total();
    checks = 0; failures = 0;
    foreach (ch[k]) begin checks += ch[k]; failures += fa[k]; end
  endfunction

  initial begin
    @(posedge clk);
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    total();
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
