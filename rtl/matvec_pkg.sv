// matvec_pkg: types and constants shared by the matrix-vector multipliers.
//
// All three multipliers work on 16-bit signed integers and keep every
// product and sum to 16 bits (two's-complement wrap-around), the data type
// of the FPGA experiments they model. MATSIZE is the default matrix size,
// the largest of the evaluated sizes (8 to 256). The partition kinds name
// the two ways the matrix array is split into banks: cyclic (successive
// elements in successive banks) and block (contiguous runs per bank).
package matvec_pkg;
  localparam int unsigned DATA_W  = 16;
  localparam int unsigned MATSIZE = 256;

  typedef logic signed [DATA_W-1:0] data_t;

  typedef enum logic {
    PART_CYCLIC = 1'b0,
    PART_BLOCK  = 1'b1
  } part_e;

  // Handshake states shared by the two pipelined HLS-style cores.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_PIPE = 2'd1,
    ST_DONE = 2'd2
  } ap_state_e;
endpackage
