// partitioned_matrix: an N x N matrix stored in N parallel memory banks.
//
// The matrix is a one-dimensional array of N*N elements, element
// k = i*N + j holding a[i][j]. Splitting it into N banks lets a core read N
// elements in one clock. Two ways of splitting are offered:
//   PART_CYCLIC  element k goes to bank k mod N, word k div N. Bank j then
//                holds column j, and reading word i of every bank gives
//                row i (used by the row-parallel core).
//   PART_BLOCK   element k goes to bank k div N, word k mod N. Bank i then
//                holds row i, and reading word j of every bank gives
//                column j (used by the column-parallel core).
// The partition factor equals N. Writes take one element per clock through
// wr_en/wr_idx/wr_data; reads present one address to every bank and return
// N words on rd_q one clock later (the mem_bank read latency).
module partitioned_matrix
  import matvec_pkg::*;
#(
  parameter int unsigned N    = MATSIZE,
  parameter part_e       PART = PART_CYCLIC,
  localparam int unsigned AW  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW  = 2 * AW
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  data_t         wr_data,
  input  logic          rd_ce,
  input  logic [AW-1:0] rd_addr,
  output data_t         rd_q [N]
);
  // With N a power of two, k div N and k mod N are the high and low halves
  // of the element index.
  logic [AW-1:0] idx_hi, idx_lo;
  logic [AW-1:0] bank_sel, word_sel;

  always_comb begin
    idx_hi = wr_idx[IW-1:AW];
    idx_lo = wr_idx[AW-1:0];
    if (PART == PART_CYCLIC) begin
      bank_sel = idx_lo;
      word_sel = idx_hi;
    end else begin
      bank_sel = idx_hi;
      word_sel = idx_lo;
    end
  end

  for (genvar g = 0; g < N; g++) begin : g_bank
    mem_bank #(.DEPTH(N)) u_bank (
      .clk   (clk),
      .we    (wr_en && (bank_sel == AW'(g))),
      .waddr (word_sel),
      .wdata (wr_data),
      .ce    (rd_ce),
      .raddr (rd_addr),
      .q     (rd_q[g])
    );
  end

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("partitioned_matrix: N must be a power of two, got %0d", N);
  end
endmodule
