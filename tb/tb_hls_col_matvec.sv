// tb_hls_col_matvec: runs the column design at N=8 for three operations
// with random A and b. The testbench models the block-partitioned matrix
// banks (bank k answers A[k][address]) and the vector memory, both with a
// one-clock read. It checks c against an integer reference when c_ap_vld
// is high, the clocks from the first column presented to the last update
// (N), the start-to-done latency (N+2), the one-cycle done/ready pulse, and
// that a new start clears the accumulators.
module tb_hls_col_matvec;
  import matvec_pkg::*;
  localparam int N = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1, ap_start = 0, ap_done, ap_idle, ap_ready;
  logic [2:0] a_address0, b_address0;
  logic a_ce0, b_ce0, c_ap_vld;
  data_t a_q0 [N], b_q0, c [N];
  data_t A [N][N], bv [N], want [N];
  int checks = 0, failures = 0;
  longint cyc = 0, first_ce, last_ce, t_start, t_done;

  hls_col_matvec #(.N(N)) dut (.ap_clk(clk), .ap_rst(rst), .*);

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (a_ce0) for (int k = 0; k < N; k++) a_q0[k] <= A[k][a_address0];
    if (b_ce0) b_q0 <= bv[b_address0];
  end

  always @(posedge clk) begin
    if (!rst && a_ce0) begin
      if (first_ce < 0) first_ce = cyc;
      last_ce = cyc;
    end
    if (!rst && ap_done && t_done < 0) begin
      t_done = cyc;
      checks++;
      if (!c_ap_vld) begin failures++; $display("FAIL c_ap_vld low in done cycle"); end
    end
    if (!rst && ap_done != ap_ready) begin failures++; $display("FAIL done/ready differ"); end
    if (!rst && a_ce0 != b_ce0) begin failures++; $display("FAIL a/b enables differ"); end
  end

  initial begin
    foreach (a_q0[k]) a_q0[k] = '0;
    b_q0 = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 3; r++) begin
      foreach (A[i, j]) A[i][j] = data_t'($urandom);
      foreach (bv[j]) bv[j] = data_t'($urandom);
      foreach (want[i]) begin
        int acc;
        acc = 0;
        for (int j = 0; j < N; j++) acc += int'(A[i][j]) * int'(bv[j]);
        want[i] = data_t'(acc[15:0]);
      end
      @(negedge clk);
      checks++;
      if (!ap_idle) begin failures++; $display("FAIL not idle"); end
      first_ce = -1; t_done = -1;
      ap_start = 1; t_start = cyc;
      @(negedge clk) ap_start = 0;
      // one clock after start every accumulator reads zero
      checks++;
      foreach (c[i]) if (c[i] !== '0) begin failures++; $display("FAIL c[%0d] not cleared", i); break; end
      wait (t_done >= 0);
      #1;
      foreach (c[i]) begin
        checks++;
        if (c[i] !== want[i]) begin failures++; $display("FAIL c[%0d]=%0d want %0d", i, c[i], want[i]); end
      end
      // last column presented at last_ce+1, final value visible one clock later
      checks++;
      if ((last_ce + 2) - (first_ce + 1) != N) begin
        failures++; $display("FAIL cycles %0d", (last_ce + 2) - (first_ce + 1));
      end
      checks++;
      if (t_done - t_start != N + 2) begin failures++; $display("FAIL start-to-done %0d", t_done - t_start); end
      @(negedge clk);
      checks++;
      if (ap_done || c_ap_vld) begin failures++; $display("FAIL done longer than one cycle"); end
      foreach (c[i]) if (c[i] !== want[i]) begin failures++; $display("FAIL c not held"); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
