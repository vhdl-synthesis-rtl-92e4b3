// tb_mma_matvec: feeds the recurrence design of size 8 column by column
// with b mirrored on every lane, with and without random clock-enable
// stalls. In the enabled cycle where the counter reads 2+j it checks that
// every lane shows the partial sum d[i,j] of an integer reference, that
// result_valid rises exactly at j = N with dOut = A*b, and that the result
// takes N enabled clocks from the first column presented.
module tb_mma_matvec;
  import matvec_pkg::*;
  localparam int N = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic CE = 1, Rst = 0, result_valid;
  data_t aMirrIn [N], bMirrIn [N], dOut [N];
  data_t A [N][N], bv [N];
  int checks = 0, failures = 0, stalls = 0;

  mma_matvec #(.N(N)) dut (.*);

  task automatic run_once(input bit with_stalls);
    int part [N];
    int j, enabled, first_seen;
    foreach (A[i, jj]) A[i][jj] = data_t'($urandom);
    foreach (bv[jj]) bv[jj] = data_t'($urandom);
    foreach (part[i]) part[i] = 0;
    @(negedge clk) begin CE = 1; Rst = 0; end
    @(negedge clk) Rst = 1;       // counter 0 in this cycle
    @(negedge clk);               // counter 1
    @(negedge clk);               // counter 2: j = 0, control bit high
    j = 0; enabled = 0; first_seen = 0;
    while (j <= N) begin
      if (j >= 1) begin
        foreach (aMirrIn[i]) aMirrIn[i] = A[i][j-1];
        foreach (bMirrIn[i]) bMirrIn[i] = bv[j-1];
      end else begin
        foreach (aMirrIn[i]) aMirrIn[i] = data_t'($urandom);  // ignored at j = 0
        foreach (bMirrIn[i]) bMirrIn[i] = data_t'($urandom);
      end
      CE = with_stalls ? ($urandom_range(3) != 0) : 1'b1;
      #1;
      if (CE) begin
        if (j >= 1) foreach (part[i]) part[i] += int'(A[i][j-1]) * int'(bv[j-1]);
        foreach (dOut[i]) begin
          checks++;
          if (dOut[i] !== data_t'(part[i])) begin
            failures++; $display("FAIL j=%0d d[%0d]=%0d want %0d", j, i, dOut[i], data_t'(part[i]));
          end
        end
        checks++;
        if (result_valid != (j == N)) begin failures++; $display("FAIL result_valid=%0d at j=%0d", result_valid, j); end
        if (j >= 1) enabled++;
        j++;
      end else stalls++;
      @(negedge clk);
    end
    checks++;
    if (enabled != N) begin failures++; $display("FAIL %0d enabled clocks, want %0d", enabled, N); end
  endtask

  initial begin
    foreach (aMirrIn[i]) begin aMirrIn[i] = '0; bMirrIn[i] = '0; end
    run_once(0);
    run_once(1);
    run_once(1);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
