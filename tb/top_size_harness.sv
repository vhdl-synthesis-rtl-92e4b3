// top_size_harness: one matvec_top of size N driven through one product on
// each of its three designs, with a random matrix and vector. It checks
// every result element against an integer reference and measures the
// clocks from the first matrix data reaching the arithmetic to the last
// result being readable, for comparison with the expected per-size counts
// (ROW_CLOCKS for the row design, N for the column and recurrence designs).
module top_size_harness
  import matvec_pkg::*;
#(
  parameter int N          = 8,
  parameter int ROW_CLOCKS = 8
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int AW = $clog2(N);
  logic rst = 1;
  logic a_load_en = 0;
  logic [2*AW-1:0] a_load_idx = '0;
  data_t a_load_data = '0;
  logic row_start = 0, row_done, row_idle, row_ready;
  data_t row_b [N];
  logic [AW-1:0] row_c_address;
  logic row_c_we;
  data_t row_c_d;
  logic col_start = 0, col_done, col_idle, col_ready;
  logic col_b_load_en = 0;
  logic [AW-1:0] col_b_load_idx = '0;
  data_t col_b_load_data = '0;
  data_t col_c [N];
  logic col_c_vld;
  logic mma_ce = 1, mma_rst_n = 0;
  data_t mma_a [N], mma_b [N], mma_d [N];
  logic mma_valid;

  matvec_top #(.N(N)) dut (.*);

  data_t A [N][N], bv [N], want [N], row_got [N];
  longint cyc = 0, row_first_ce = -1, row_last_we = -1, col_first_ce = -1, col_last_ce = -1;
  int row_clocks, col_clocks, mma_clocks;
  logic col_checked = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (!rst && row_c_we) begin row_got[row_c_address] = row_c_d; row_last_we = cyc; end
    if (!rst && dut.u_row.a_ce0 && row_first_ce < 0) row_first_ce = cyc;
    if (!rst && dut.u_col.a_ce0) begin
      if (col_first_ce < 0) col_first_ce = cyc;
      col_last_ce = cyc;
    end
    if (!rst && col_done && !col_checked) begin
      col_checked = 1;
      foreach (col_c[i]) begin
        checks++;
        if (col_c[i] !== want[i]) begin failures++; $display("FAIL N=%0d col c[%0d]", N, i); end
      end
    end
  end

  initial begin
    checks = 0; failures = 0; finished = 0;
    foreach (mma_a[i]) begin mma_a[i] = '0; mma_b[i] = '0; end
    foreach (A[i, j]) A[i][j] = data_t'($urandom);
    foreach (bv[j]) bv[j] = data_t'($urandom);
    row_b = bv;
    foreach (want[i]) begin
      int acc;
      acc = 0;
      for (int j = 0; j < N; j++) acc += int'(A[i][j]) * int'(bv[j]);
      want[i] = data_t'(acc[15:0]);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (A[i, j]) begin
      @(negedge clk);
      a_load_en = 1; a_load_idx = (2*AW)'(i * N + j); a_load_data = A[i][j];
    end
    foreach (bv[j]) begin
      @(negedge clk);
      a_load_en = 0;
      col_b_load_en = 1; col_b_load_idx = AW'(j); col_b_load_data = bv[j];
    end
    @(negedge clk) col_b_load_en = 0;

    row_start = 1; col_start = 1;
    @(negedge clk) begin row_start = 0; col_start = 0; end
    wait (row_done);
    repeat (2) @(negedge clk);
    foreach (row_got[i]) begin
      checks++;
      if (row_got[i] !== want[i]) begin failures++; $display("FAIL N=%0d row c[%0d]", N, i); end
    end
    row_clocks = int'(row_last_we - row_first_ce);
    col_clocks = int'((col_last_ce + 2) - (col_first_ce + 1));

    // recurrence design, no stalls
    @(negedge clk) begin mma_ce = 1; mma_rst_n = 0; end
    @(negedge clk) mma_rst_n = 1;
    repeat (2) @(negedge clk);
    mma_clocks = 0;
    for (int j = 1; j <= N; j++) begin
      @(negedge clk);
      foreach (mma_a[i]) begin mma_a[i] = A[i][j-1]; mma_b[i] = bv[j-1]; end
      mma_clocks++;
      #1;
      if (mma_valid) break;
    end
    checks++;
    if (!mma_valid) begin failures++; $display("FAIL N=%0d mma_valid never rose", N); end
    foreach (mma_d[i]) begin
      checks++;
      if (mma_d[i] !== want[i]) begin failures++; $display("FAIL N=%0d mma d[%0d]", N, i); end
    end

    $display("size %0d: row %0d clocks (expected %0d), column %0d (expected %0d), recurrence %0d (expected %0d)",
             N, row_clocks, ROW_CLOCKS, col_clocks, N, mma_clocks, N);
    checks += 4;
    if (!col_checked) begin failures++; $display("FAIL N=%0d column result never checked", N); end
    if (row_clocks != ROW_CLOCKS) failures++;
    if (col_clocks != N) failures++;
    if (mma_clocks != N) failures++;
    finished = 1;
  end
endmodule
