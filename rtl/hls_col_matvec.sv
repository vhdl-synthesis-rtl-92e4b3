// hls_col_matvec: column-parallel matrix-vector multiplier, c = A * b.
//
// The loop over the columns j is pipelined with one column per clock; the
// loop over the rows i is fully unrolled into N multiplier-adders. The
// result vector c is fully partitioned into N accumulator registers, all
// cleared in the start cycle. The matrix lives in N external banks,
// block-partitioned so that bank i holds row i; reading word j of every
// bank yields column j. The vector b sits in one external memory and its
// single read value b[j] is broadcast to every multiplier-adder.
//
// Pipeline, one column per clock:
//   iteration stage 0  column counter j drives a_address0 and b_address0
//                      with the enables high; the loop exits at j == N.
//   iteration stage 1  column j of A arrives on a_q0 and b[j] on b_q0;
//                      every accumulator takes c[i] + a[i][j] * b[j].
// The datapath depth does not depend on N. From the first column presented
// to the last accumulator update being visible, the run takes N clocks.
//
// Handshake as in hls_row_matvec (start/done/idle/ready, synchronous
// active-high ap_rst). c holds the result from the done cycle until the
// next start; c_ap_vld is high in the done cycle. The document gives this
// design's source loop and its datapath; the controller, which it does not
// print, reuses the row design's and is this design's choice.
module hls_col_matvec
  import matvec_pkg::*;
#(
  parameter int unsigned N   = MATSIZE,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          ap_clk,
  input  logic          ap_rst,
  input  logic          ap_start,
  output logic          ap_done,
  output logic          ap_idle,
  output logic          ap_ready,
  output logic [AW-1:0] a_address0,
  output logic          a_ce0,
  input  data_t         a_q0 [N],
  output logic [AW-1:0] b_address0,
  output logic          b_ce0,
  input  data_t         b_q0,
  output data_t         c [N],
  output logic          c_ap_vld
);
  ap_state_e   state, state_nxt;
  logic [AW:0] j_reg;
  logic        iter0_en;
  logic        exitcond;
  logic        issue;
  logic        vld1;
  data_t       acc     [N];
  data_t       acc_nxt [N];

  always_comb begin
    exitcond = (j_reg == (AW+1)'(N));
    issue    = (state == ST_PIPE) && iter0_en && !exitcond;
  end

  always_comb begin
    state_nxt = state;
    unique case (state)
      ST_IDLE: if (ap_start) state_nxt = ST_PIPE;
      ST_PIPE: if ((!iter0_en || exitcond) && vld1 && !issue) state_nxt = ST_DONE;
      ST_DONE: state_nxt = ST_IDLE;
      default: state_nxt = ST_IDLE;
    endcase
  end

  always_ff @(posedge ap_clk) begin
    if (ap_rst) begin
      state    <= ST_IDLE;
      iter0_en <= 1'b0;
      j_reg    <= '0;
      vld1     <= 1'b0;
    end else begin
      state <= state_nxt;
      vld1  <= issue;
      if (state == ST_IDLE && ap_start) begin
        iter0_en <= 1'b1;
        j_reg    <= '0;
      end else if (state == ST_PIPE && iter0_en) begin
        if (exitcond) iter0_en <= 1'b0;
        else          j_reg    <= j_reg + 1'b1;
      end
    end
  end

  // N multiplier-adders, one per row, all fed the same b value.
  for (genvar g = 0; g < N; g++) begin : g_mac
    mac16 u_mac (.in0(a_q0[g]), .in1(b_q0), .in2(acc[g]), .dout(acc_nxt[g]));
  end

  always_ff @(posedge ap_clk) begin
    if (ap_rst) begin
      acc <= '{default: '0};
    end else if (state == ST_IDLE && ap_start) begin
      acc <= '{default: '0};          // unrolled initialisation loop
    end else if (vld1) begin
      acc <= acc_nxt;
    end
  end

  always_comb begin
    a_address0 = j_reg[AW-1:0];
    a_ce0      = issue;
    b_address0 = j_reg[AW-1:0];
    b_ce0      = issue;
    c          = acc;
    c_ap_vld   = (state == ST_DONE);
    ap_done    = (state == ST_DONE);
    ap_ready   = (state == ST_DONE);
    ap_idle    = (state == ST_IDLE) && !ap_start;
  end

  assert property (@(posedge ap_clk) disable iff (ap_rst) vld1 |-> state == ST_PIPE);
endmodule
