// mul16: 16-bit signed multiplier, product truncated to 16 bits.
//
// Combinational p = a * b, keeping the low 16 bits of the full product,
// which is what the generated multiplier core does before it is mapped to
// a DSP block. Used for the even lanes of the row design's dot product.
// Interface: a, b in; p out. Timing: no register, zero latency.
module mul16
  import matvec_pkg::*;
(
  input  data_t a,
  input  data_t b,
  output data_t p
);
  // In a 16-bit context the multiplication yields the low 16 bits of the
  // full 32-bit product, which is exactly the truncation wanted.
  always_comb p = a * b;
endmodule
