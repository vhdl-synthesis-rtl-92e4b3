// mem_bank: one bank of a partitioned array, DEPTH words of 16 bits.
//
// A simple dual-port memory: a write port (we, waddr, wdata) used to load
// the bank, and a read port with chip enable (ce, raddr) whose data appear
// on q one clock after the address, like a block RAM read through the
// address/ce/q port of an HLS memory interface. q holds its value while ce
// is low. The bank's contents are not reset.
module mem_bank
  import matvec_pkg::*;
#(
  parameter int unsigned DEPTH = MATSIZE,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  data_t         wdata,
  input  logic          ce,
  input  logic [AW-1:0] raddr,
  output data_t         q
);
  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (ce) q <= mem[raddr];
  end
endmodule
