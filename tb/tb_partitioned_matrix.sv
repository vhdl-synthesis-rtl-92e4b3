// tb_partitioned_matrix: loads a random 8x8 matrix into a cyclic and a
// block partitioned copy, then reads every word address of both. The
// cyclic copy must return row i on its banks at address i, the block copy
// column j at address j; data must appear one clock after the address.
module tb_partitioned_matrix;
  import matvec_pkg::*;
  localparam int N = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_ce = 0;
  logic [5:0] wr_idx = '0;
  logic [2:0] rd_addr = '0;
  data_t wr_data = '0;
  data_t q_cyc [N], q_blk [N];
  data_t a [N][N];
  int checks = 0, failures = 0;

  partitioned_matrix #(.N(N), .PART(PART_CYCLIC)) u_cyc (
    .clk, .wr_en, .wr_idx, .wr_data, .rd_ce, .rd_addr, .rd_q(q_cyc));
  partitioned_matrix #(.N(N), .PART(PART_BLOCK)) u_blk (
    .clk, .wr_en, .wr_idx, .wr_data, .rd_ce, .rd_addr, .rd_q(q_blk));

  initial begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        a[i][j] = data_t'($urandom);
        wr_en = 1; wr_idx = 6'(i * N + j); wr_data = a[i][j];
      end
    @(negedge clk) wr_en = 0;
    for (int r = 0; r < N; r++) begin
      @(negedge clk) begin rd_ce = 1; rd_addr = 3'(r); end
      @(negedge clk) rd_ce = 0;
      for (int k = 0; k < N; k++) begin
        checks += 2;
        if (q_cyc[k] !== a[r][k]) begin
          failures++; $display("FAIL cyclic addr %0d bank %0d: %h want %h", r, k, q_cyc[k], a[r][k]);
        end
        if (q_blk[k] !== a[k][r]) begin
          failures++; $display("FAIL block addr %0d bank %0d: %h want %h", r, k, q_blk[k], a[k][r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
