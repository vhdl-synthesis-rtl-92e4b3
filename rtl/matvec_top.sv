// matvec_top: three N x N matrix-vector multipliers (c = A * b) side by side.
//
// The three designs compute the same product with different parallelism
// and serve to compare them on equal terms:
//   row_*  hls_row_matvec: one row of A per clock against the whole vector,
//          adder tree, N (or N+1 from N = 16) clocks. Its matrix memory is
//          a partitioned_matrix with cyclic partitioning (bank j = column
//          j). b enters as N parallel inputs; c leaves through a memory
//          write port (address, enable, data).
//   col_*  hls_col_matvec: one column of A per clock, N multiplier-adders,
//          N clocks. Its matrix memory is block-partitioned (bank i = row
//          i); b is held in a one-bank vector memory loaded through
//          col_b_load_*; c is N parallel outputs valid with col_c_vld.
//   mma_*  mma_matvec: N cells each accumulating a[i][j]*b[j], one column
//          per clock, fed directly by the user with b mirrored on every
//          lane; its own clock enable and active-low reset.
// One matrix loader (a_load_*) writes element idx = i*N + j into both
// partitioned memories at once, one element per clock, so loading takes
// N*N clocks before either HLS design is started. The two HLS designs share
// the synchronous active-high reset rst; the MMAlpha design uses mma_rst_n.
module matvec_top
  import matvec_pkg::*;
#(
  parameter int unsigned N   = MATSIZE,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst,
  // Matrix loader, shared by both HLS designs
  input  logic            a_load_en,
  input  logic [2*AW-1:0] a_load_idx,
  input  data_t           a_load_data,
  // Row design
  input  logic            row_start,
  output logic            row_done,
  output logic            row_idle,
  output logic            row_ready,
  input  data_t           row_b [N],
  output logic [AW-1:0]   row_c_address,
  output logic            row_c_we,
  output data_t           row_c_d,
  // Column design
  input  logic            col_start,
  output logic            col_done,
  output logic            col_idle,
  output logic            col_ready,
  input  logic            col_b_load_en,
  input  logic [AW-1:0]   col_b_load_idx,
  input  data_t           col_b_load_data,
  output data_t           col_c [N],
  output logic            col_c_vld,
  // MMAlpha design
  input  logic            mma_ce,
  input  logic            mma_rst_n,
  input  data_t           mma_a [N],
  input  data_t           mma_b [N],
  output data_t           mma_d [N],
  output logic            mma_valid
);
  // Row design and its cyclic-partitioned matrix -------------------------
  logic [AW-1:0] row_a_addr;
  logic          row_a_ce;
  data_t         row_a_q [N];
  logic          row_c_ce;

  partitioned_matrix #(.N(N), .PART(PART_CYCLIC)) u_row_mem (
    .clk     (clk),
    .wr_en   (a_load_en),
    .wr_idx  (a_load_idx),
    .wr_data (a_load_data),
    .rd_ce   (row_a_ce),
    .rd_addr (row_a_addr),
    .rd_q    (row_a_q)
  );

  hls_row_matvec #(.N(N)) u_row (
    .ap_clk     (clk),
    .ap_rst     (rst),
    .ap_start   (row_start),
    .ap_done    (row_done),
    .ap_idle    (row_idle),
    .ap_ready   (row_ready),
    .a_address0 (row_a_addr),
    .a_ce0      (row_a_ce),
    .a_q0       (row_a_q),
    .b          (row_b),
    .c_address0 (row_c_address),
    .c_ce0      (row_c_ce),
    .c_we0      (row_c_we),
    .c_d0       (row_c_d)
  );

  // Column design, its block-partitioned matrix and its vector memory ----
  logic [AW-1:0] col_a_addr, col_b_addr;
  logic          col_a_ce, col_b_ce;
  data_t         col_a_q [N];
  data_t         col_b_q;

  partitioned_matrix #(.N(N), .PART(PART_BLOCK)) u_col_mem (
    .clk     (clk),
    .wr_en   (a_load_en),
    .wr_idx  (a_load_idx),
    .wr_data (a_load_data),
    .rd_ce   (col_a_ce),
    .rd_addr (col_a_addr),
    .rd_q    (col_a_q)
  );

  mem_bank #(.DEPTH(N)) u_col_bmem (
    .clk   (clk),
    .we    (col_b_load_en),
    .waddr (col_b_load_idx),
    .wdata (col_b_load_data),
    .ce    (col_b_ce),
    .raddr (col_b_addr),
    .q     (col_b_q)
  );

  hls_col_matvec #(.N(N)) u_col (
    .ap_clk     (clk),
    .ap_rst     (rst),
    .ap_start   (col_start),
    .ap_done    (col_done),
    .ap_idle    (col_idle),
    .ap_ready   (col_ready),
    .a_address0 (col_a_addr),
    .a_ce0      (col_a_ce),
    .a_q0       (col_a_q),
    .b_address0 (col_b_addr),
    .b_ce0      (col_b_ce),
    .b_q0       (col_b_q),
    .c          (col_c),
    .c_ap_vld   (col_c_vld)
  );

  // MMAlpha design ---------------------------------------------------------
  mma_matvec #(.N(N)) u_mma (
    .clk          (clk),
    .CE           (mma_ce),
    .Rst          (mma_rst_n),
    .aMirrIn      (mma_a),
    .bMirrIn      (mma_b),
    .dOut         (mma_d),
    .result_valid (mma_valid)
  );

  // The c memory enable of the row design always equals its write enable.
  assert property (@(posedge clk) disable iff (rst) row_c_ce == row_c_we);
endmodule
