// mma_matvec: matrix-vector multiplier derived from a recurrence equation.
//
// The recurrence d[i,0] = 0, d[i,j] = d[i,j-1] + a[i,j] * b[j] (j = 1..N),
// c[i] = d[i,N] is mapped onto N identical cells, one per row i, with time
// standing for j. Each cell holds d in a clock-enabled register and
// computes, combinationally,
//     dOut[i] = 0                              when the control bit is set
//     dOut[i] = d_reg[i] + aMirrIn[i]*bMirrIn[i]  otherwise (16-bit wrap).
// An mma_controller raises the control bit for one clock (j = 0).
//
// Feeding: after Rst is released, the clock in which the controller counter
// reads 2 is j = 0 (inputs ignored); in the clock where it reads 2+j the
// user presents column j of A on aMirrIn (row i on lane i) and b[j] copied
// on every lane of bMirrIn. In the clock where the counter reads N+2,
// dOut holds c. result_valid marks that clock; it is this design's
// addition, the generated entity having no valid output. Dropping CE
// freezes every register, counter included, so input may be paused;
// dOut is combinational, so the current column must be held on the inputs
// while CE is low if dOut is to be read during the pause.
// Because the cells keep accumulating, dOut is only meaningful while
// result_valid is high (or after the next Rst).
//
// Unlike the HLS designs there is one b input per cell: the user must
// duplicate the vector element N times. Rst is synchronous, active low,
// sampled with CE high, and also clears the d registers (the generated
// design leaves them unreset).
module mma_matvec
  import matvec_pkg::*;
#(
  parameter int unsigned N = MATSIZE
) (
  input  logic  clk,
  input  logic  CE,
  input  logic  Rst,
  input  data_t aMirrIn [N],
  input  data_t bMirrIn [N],
  output data_t dOut    [N],
  output logic  result_valid
);
  logic [31:0] counter;
  logic        dXctl1;
  data_t       dSepTime1 [N];   // d[i, j-1]
  data_t       TSep2Out  [N];   // d[i, j-1] + a*b

  mma_controller #(.N(N)) u_ctl (
    .clk       (clk),
    .CE        (CE),
    .Rst       (Rst),
    .counter   (counter),
    .dXctl1Out (dXctl1)
  );

  for (genvar p = 0; p < N; p++) begin : g_cell
    mac16 u_mac (.in0(aMirrIn[p]), .in1(bMirrIn[p]), .in2(dSepTime1[p]), .dout(TSep2Out[p]));

    always_comb dOut[p] = dXctl1 ? '0 : TSep2Out[p];

    always_ff @(posedge clk) begin
      if (CE) begin
        if (!Rst) dSepTime1[p] <= '0;
        else      dSepTime1[p] <= dOut[p];
      end
    end
  end

  always_comb result_valid = (counter == 32'(N + 2));
endmodule
