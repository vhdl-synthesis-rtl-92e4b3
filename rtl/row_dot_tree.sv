// row_dot_tree: dot product of one matrix row with the vector b.
//
// Lanes are taken in pairs. In each pair the even lane is multiplied by a
// mul16 and the odd lane is multiplied and added to it by a mac16, so the
// first level produces N/2 pair sums with N multiplications. A binary tree
// of log2(N/2) adder levels then reduces the pair sums to one 16-bit
// result. All arithmetic wraps at 16 bits.
//
// The whole chain is combinational when EXTRA_STAGE is 0. Its depth grows
// with log2(N); for larger sizes (16 and up) a pipeline register is
// inserted after the pair level to shorten the path, which costs one clock
// of latency. That register loads when en is high. The register's position
// is this design's choice.
//
// Interface: a[N], b[N] in; sum out, valid with the inputs (EXTRA_STAGE=0)
// or one clock after en sampled them (EXTRA_STAGE=1).
module row_dot_tree
  import matvec_pkg::*;
#(
  parameter int unsigned N           = MATSIZE,
  parameter bit          EXTRA_STAGE = (N >= 16)
) (
  input  logic  clk,
  input  logic  en,
  input  data_t a [N],
  input  data_t b [N],
  output data_t sum
);
  localparam int unsigned P      = N / 2;                       // pair sums

  data_t even_prod [P];
  data_t pair_sum  [P];
  data_t pair_q    [P];   // pair sums as seen by the adder tree
  data_t heap      [2*P-1];

  for (genvar p = 0; p < P; p++) begin : g_pair
    mul16 u_mul (.a(a[2*p]),   .b(b[2*p]),   .p(even_prod[p]));
    mac16 u_mac (.in0(a[2*p+1]), .in1(b[2*p+1]), .in2(even_prod[p]), .dout(pair_sum[p]));
  end

  if (EXTRA_STAGE) begin : g_reg
    always_ff @(posedge clk) begin
      if (en) pair_q <= pair_sum;
    end
  end else begin : g_comb
    always_comb pair_q = pair_sum;
  end

  // Adder tree stored as a binary heap: leaves heap[P-1 .. 2P-2] are the
  // pair sums, node k adds its children 2k+1 and 2k+2, heap[0] is the root.
  for (genvar m = 0; m < P; m++) begin : g_leaf
    assign heap[P-1+m] = pair_q[m];
  end
  for (genvar k = 0; k < P - 1; k++) begin : g_node
    assign heap[k] = heap[2*k+1] + heap[2*k+2];
  end
  assign sum = heap[0];

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("row_dot_tree: N must be a power of two, got %0d", N);
  end
endmodule
