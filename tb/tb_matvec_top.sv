// tb_matvec_top: end-to-end test of the three multipliers at the default
// size (N = MATSIZE = 256), top parameters untouched.
//
// One random matrix A is loaded through the shared loader (N*N clocks) and
// the vector memory of the column design is filled. Then:
//   run 1  the row design alone, then the column design alone, same b;
//   run 2  both HLS designs started in the same clock with a new b;
//   run 3  the recurrence design, fed column by column with random
//          clock-enable stalls, for the first b.
// Every result element is compared with an integer reference, and the
// clocks from first input to last result are checked: N+1 for the row
// design (its extra adder-tree stage is active at this size), N for the
// other two. The mechanisms exercised are counted and each must occur:
// row extra-stage runs, completed start/done handshakes, accumulator
// clears on start, clock-enable stalls and control pulses of the
// recurrence design, and writes into both partitioned memories.
module tb_matvec_top;
  import matvec_pkg::*;
  localparam int N  = MATSIZE;
  localparam int AW = $clog2(N);

  logic clk = 0;
  always #5 clk = ~clk;
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

  matvec_top dut (.*);

  data_t A [N][N];
  data_t bv [N];
  data_t want [N];
  data_t row_got [N];
  int    row_wr [N];
  int checks = 0, failures = 0;
  // mechanism counters
  int n_extra_stage = 0, n_row_hs = 0, n_col_hs = 0, n_col_clear = 0;
  int n_mma_stall = 0, n_mma_ctl = 0, n_load_cyclic = 0, n_load_block = 0;
  longint cyc = 0, row_first_ce, row_last_we, col_first_ce, col_last_ce;

  always_ff @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (!rst && row_c_we) begin
      row_got[row_c_address] = row_c_d;
      row_wr[row_c_address]++;
      row_last_we = cyc;
    end
    if (!rst && dut.u_row.a_ce0 && row_first_ce < 0) row_first_ce = cyc;
    if (!rst && dut.u_col.a_ce0) begin
      if (col_first_ce < 0) col_first_ce = cyc;
      col_last_ce = cyc;
    end
    if (!rst && row_done) n_row_hs++;
    if (!rst && col_done) begin
      n_col_hs++;
      foreach (col_c[i]) begin
        checks++;
        if (col_c[i] !== want[i]) begin
          failures++;
          if (failures < 10) $display("FAIL col c[%0d]=%0d want %0d", i, col_c[i], want[i]);
        end
      end
      checks++;
      if (!col_c_vld) begin failures++; $display("FAIL col_c_vld low with done"); end
    end
    if (!rst && a_load_en) begin
      n_load_cyclic++;   // both memories take every loader write
      n_load_block++;
    end
    if (mma_ce && mma_rst_n && dut.u_mma.dXctl1) n_mma_ctl++;
  end

  task automatic make_ref();
    foreach (want[i]) begin
      int acc;
      acc = 0;
      for (int j = 0; j < N; j++) acc += int'(A[i][j]) * int'(bv[j]);
      want[i] = data_t'(acc[15:0]);
    end
  endtask

  task automatic load_b();
    foreach (bv[j]) begin
      @(negedge clk);
      col_b_load_en = 1; col_b_load_idx = AW'(j); col_b_load_data = bv[j];
    end
    @(negedge clk) col_b_load_en = 0;
    row_b = bv;
  endtask

  task automatic check_row();
    foreach (row_wr[i]) begin
      checks++;
      if (row_wr[i] != 1 || row_got[i] !== want[i]) begin
        failures++;
        if (failures < 10) $display("FAIL row c[%0d]=%0d (%0d writes) want %0d", i, row_got[i], row_wr[i], want[i]);
      end
    end
    checks++;
    if (row_last_we - row_first_ce != N + ((N >= 16) ? 1 : 0)) begin
      failures++; $display("FAIL row cycles %0d", row_last_we - row_first_ce);
    end
    if (N >= 16) n_extra_stage++;
  endtask

  task automatic check_col_cycles();
    checks++;
    if ((col_last_ce + 2) - (col_first_ce + 1) != N) begin
      failures++; $display("FAIL col cycles %0d", (col_last_ce + 2) - (col_first_ce + 1));
    end
  endtask

  task automatic clear_marks();
    foreach (row_wr[i]) row_wr[i] = 0;
    row_first_ce = -1; col_first_ce = -1;
  endtask

  initial begin
    foreach (row_b[i]) row_b[i] = '0;
    foreach (mma_a[i]) begin mma_a[i] = '0; mma_b[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    // load the matrix, row-major index i*N + j
    foreach (A[i, j]) begin
      A[i][j] = data_t'($urandom);
      @(negedge clk);
      a_load_en = 1; a_load_idx = (2*AW)'(i * N + j); a_load_data = A[i][j];
    end
    @(negedge clk) a_load_en = 0;

    // run 1: row then column, same b
    foreach (bv[j]) bv[j] = data_t'($urandom);
    make_ref();
    load_b();
    clear_marks();
    checks++;
    if (!row_idle || !col_idle) begin failures++; $display("FAIL designs not idle"); end
    row_start = 1;
    @(negedge clk) row_start = 0;
    wait (row_done);
    @(negedge clk);
    check_row();
    col_start = 1;
    @(negedge clk) begin
      col_start = 0;
      if (dut.u_col.acc[0] == '0 && dut.u_col.acc[N-1] == '0) n_col_clear++;
    end
    wait (col_done);
    repeat (2) @(negedge clk);
    check_col_cycles();

    // run 2: both at once, new b
    foreach (bv[j]) bv[j] = data_t'($urandom);
    make_ref();
    load_b();
    clear_marks();
    row_start = 1; col_start = 1;
    @(negedge clk) begin
      row_start = 0; col_start = 0;
      if (dut.u_col.acc[0] == '0 && dut.u_col.acc[N-1] == '0) n_col_clear++;
    end
    wait (row_done);
    repeat (2) @(negedge clk);
    check_row();
    check_col_cycles();

    // run 3: recurrence design with stalls
    begin
      int j, enabled;
      @(negedge clk) begin mma_ce = 1; mma_rst_n = 0; end
      @(negedge clk) mma_rst_n = 1;
      @(negedge clk);
      @(negedge clk);                       // j = 0
      j = 0; enabled = 0;
      while (j <= N) begin
        if (j >= 1) foreach (mma_a[i]) begin mma_a[i] = A[i][j-1]; mma_b[i] = bv[j-1]; end
        mma_ce = ($urandom_range(4) != 0);
        #1;
        if (mma_ce) begin
          checks++;
          if (mma_valid != (j == N)) begin failures++; $display("FAIL mma_valid at j=%0d", j); end
          if (j == N) foreach (mma_d[i]) begin
            checks++;
            if (mma_d[i] !== want[i]) begin
              failures++;
              if (failures < 10) $display("FAIL mma d[%0d]=%0d want %0d", i, mma_d[i], want[i]);
            end
          end
          if (j >= 1) enabled++;
          j++;
        end else n_mma_stall++;
        @(negedge clk);
      end
      checks++;
      if (enabled != N) begin failures++; $display("FAIL mma took %0d clocks", enabled); end
    end

    $display("mechanisms: extra_stage=%0d row_handshakes=%0d col_handshakes=%0d col_clears=%0d mma_stalls=%0d mma_ctl=%0d loads=%0d/%0d",
             n_extra_stage, n_row_hs, n_col_hs, n_col_clear, n_mma_stall, n_mma_ctl, n_load_cyclic, n_load_block);
    begin
      int mech [8];
      mech = '{n_extra_stage, n_row_hs, n_col_hs, n_col_clear, n_mma_stall, n_mma_ctl, n_load_cyclic, n_load_block};
      foreach (mech[k]) begin
        checks++;
        if (mech[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * N * N + 100 * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
