// row_matvec_harness: drives one hls_row_matvec of size N through RUNS
// back-to-back operations with random A and b, modelling the N matrix
// banks itself (cyclic partition: bank k answers A[address][k] one clock
// after a_ce0). It checks every c write against an integer reference,
// that each element is written exactly once, the handshake pulses, the
// clocks from first row read to last result (N, or N+1 with the extra
// stage) and the start-to-done latency (N+2, or N+3).
module row_matvec_harness
  import matvec_pkg::*;
#(
  parameter int N    = 8,
  parameter int RUNS = 3
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   extra_stage_runs,
  output logic finished
);
  localparam int AW = $clog2(N);
  localparam bit EXTRA = (N >= 16);
  logic ap_start = 0, ap_done, ap_idle, ap_ready;
  logic [AW-1:0] a_address0, c_address0;
  logic a_ce0, c_ce0, c_we0;
  data_t a_q0 [N], b [N], c_d0;
  data_t A [N][N];
  data_t want [N];
  int written [N];

  hls_row_matvec #(.N(N)) dut (
    .ap_clk(clk), .ap_rst(rst), .ap_start, .ap_done, .ap_idle, .ap_ready,
    .a_address0, .a_ce0, .a_q0, .b, .c_address0, .c_ce0, .c_we0, .c_d0);

  // bank model
  always_ff @(posedge clk)
    if (a_ce0) for (int k = 0; k < N; k++) a_q0[k] <= A[a_address0][k];

  longint cyc = 0;
  longint first_ce, last_we, t_start, t_done;
  always_ff @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (!rst && c_we0) begin
      checks++;
      if (c_d0 !== want[c_address0]) begin
        failures++;
        $display("FAIL N=%0d c[%0d] = %0d want %0d", N, c_address0, c_d0, want[c_address0]);
      end
      written[c_address0]++;
      last_we = cyc;
    end
    if (!rst && a_ce0 && first_ce < 0) first_ce = cyc;
    if (!rst && ap_done && t_done < 0) t_done = cyc;
  end

  initial begin
    checks = 0; failures = 0; finished = 0; extra_stage_runs = 0;
    foreach (a_q0[k]) a_q0[k] = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int r = 0; r < RUNS; r++) begin
      foreach (A[i, j]) A[i][j] = data_t'($urandom);
      foreach (b[j]) b[j] = (r == 0) ? data_t'($urandom_range(7)) : data_t'($urandom);
      foreach (want[i]) begin
        int acc;
        acc = 0;
        for (int j = 0; j < N; j++) acc += int'(A[i][j]) * int'(b[j]);
        want[i] = data_t'(acc[15:0]);
        written[i] = 0;
      end
      checks++;
      if (!ap_idle) begin failures++; $display("FAIL N=%0d not idle before start", N); end
      first_ce = -1; t_done = -1;
      ap_start = 1;
      t_start = cyc;
      @(negedge clk) ap_start = 0;
      wait (t_done >= 0);
      @(negedge clk);
      foreach (written[i]) begin
        checks++;
        if (written[i] != 1) begin failures++; $display("FAIL N=%0d c[%0d] written %0d times", N, i, written[i]); end
      end
      checks++;
      if (last_we - first_ce != N + (EXTRA ? 1 : 0)) begin
        failures++; $display("FAIL N=%0d cycles %0d want %0d", N, last_we - first_ce, N + (EXTRA ? 1 : 0));
      end
      checks++;
      if (t_done - t_start != N + 2 + (EXTRA ? 1 : 0)) begin
        failures++; $display("FAIL N=%0d start-to-done %0d", N, t_done - t_start);
      end
      if (EXTRA) extra_stage_runs++;
      checks++;
      if (ap_done) begin failures++; $display("FAIL N=%0d done longer than one cycle", N); end
      repeat ($urandom_range(3)) @(negedge clk);
    end
    finished = 1;
  end

  // done and ready always pulse together
  always @(posedge clk)
    if (!rst && ap_done != ap_ready) begin failures++; $display("FAIL done/ready differ"); end
endmodule
