// mac16: 16-bit signed multiplier-adder, dout = in0 * in1 + in2.
//
// The product of two 16-bit signed values is added to a third and the sum
// is truncated to 16 bits, the arithmetic of a DSP48 multiply-add slice
// with a 27x18 multiplier and a 48-bit post-adder. It is the cell that
// every design here is built from: lane pairs of the row design, the
// accumulators of the column design. Combinational, zero latency.
module mac16
  import matvec_pkg::*;
(
  input  data_t in0,
  input  data_t in1,
  input  data_t in2,
  output data_t dout
);
  // Evaluated at 16 bits: the low 16 bits of in0*in1 + in2 do not depend
  // on the wider intermediate precision of the DSP slice.
  always_comb dout = in0 * in1 + in2;
endmodule
