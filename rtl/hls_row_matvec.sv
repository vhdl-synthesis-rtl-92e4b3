// hls_row_matvec: row-parallel matrix-vector multiplier, c = A * b.
//
// This is the structure an HLS tool builds from a doubly nested loop whose
// inner loop (over the columns) is fully unrolled and whose outer loop
// (over the rows) is pipelined with an initiation interval of one. The
// matrix lives in N external banks, cyclic-partitioned so that bank j holds
// column j; the vector b is fully partitioned into N parallel inputs; c is
// written one element per clock through a memory write port.
//
// Pipeline, one row per clock:
//   iteration stage 0  row counter i drives a_address0 with a_ce0 high and
//                      b is captured; when i reaches N the loop exits.
//   iteration stage 1  the N words of row i arrive on a_q0 and row_dot_tree
//                      forms the dot product; with EXTRA_STAGE=0 the sum
//                      is written to c[i] in this cycle.
//   iteration stage 2  (EXTRA_STAGE=1 only) the second half of the adder
//                      tree, after its pipeline register, writes c[i].
// The extra stage is on by default from N=16 upward, so the cycle count
// from the first row read to the last c element written is N (N < 16) or
// N+1.
//
// Block handshake (start/done/idle/ready): ap_start in the idle state starts
// one run; ap_done and ap_ready pulse together for one cycle after the last
// write; ap_idle is high in the idle state while ap_start is low.
// ap_rst is synchronous and active high. Control follows the generated
// controller of the document's size-4 example; the tree generalisation and
// the register position are this design's choices.
module hls_row_matvec
  import matvec_pkg::*;
#(
  parameter int unsigned N           = MATSIZE,
  parameter bit          EXTRA_STAGE = (N >= 16),
  localparam int unsigned AW         = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned D          = EXTRA_STAGE ? 2 : 1   // stages after issue
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
  input  data_t         b [N],
  output logic [AW-1:0] c_address0,
  output logic          c_ce0,
  output logic          c_we0,
  output data_t         c_d0
);
  ap_state_e     state, state_nxt;
  logic [AW:0]   i_reg;               // loop counter, one bit wider for i == N
  logic          iter0_en;            // stage 0 active
  logic          exitcond;
  logic          issue;               // a row address is issued this cycle
  logic [D:1]    vld;                 // row valid in stage k
  logic [AW-1:0] row_idx [1:D];       // row index carried down the pipeline
  data_t         b_reg [N];
  logic          last_write;

  always_comb begin
    exitcond   = (i_reg == (AW+1)'(N));
    issue      = (state == ST_PIPE) && iter0_en && !exitcond;
    // The last write happens when the final stage holds a row and nothing
    // is left behind it.
    last_write = vld[D] && !issue;
    for (int k = 1; k < D; k++)
      if (vld[k]) last_write = 1'b0;
  end

  // Controller -------------------------------------------------------------
  always_comb begin
    state_nxt = state;
    unique case (state)
      ST_IDLE: if (ap_start) state_nxt = ST_PIPE;
      ST_PIPE: if ((!iter0_en || exitcond) && last_write) state_nxt = ST_DONE;
      ST_DONE: state_nxt = ST_IDLE;
      default: state_nxt = ST_IDLE;
    endcase
  end

  always_ff @(posedge ap_clk) begin
    if (ap_rst) begin
      state    <= ST_IDLE;
      iter0_en <= 1'b0;
      i_reg    <= '0;
      vld      <= '0;
    end else begin
      state <= state_nxt;
      if (state == ST_IDLE && ap_start) begin
        iter0_en <= 1'b1;
        i_reg    <= '0;
      end else if (state == ST_PIPE && iter0_en) begin
        if (exitcond) iter0_en <= 1'b0;
        else          i_reg    <= i_reg + 1'b1;
      end
      vld[1] <= issue;
      for (int k = 2; k <= D; k++) vld[k] <= vld[k-1];
    end
  end

  always_ff @(posedge ap_clk) begin
    if (issue) b_reg <= b;
    row_idx[1] <= i_reg[AW-1:0];
    for (int k = 2; k <= D; k++) row_idx[k] <= row_idx[k-1];
  end

  // Datapath ---------------------------------------------------------------
  row_dot_tree #(.N(N), .EXTRA_STAGE(EXTRA_STAGE)) u_tree (
    .clk (ap_clk),
    .en  (vld[1]),
    .a   (a_q0),
    .b   (b_reg),
    .sum (c_d0)
  );

  always_comb begin
    a_address0 = i_reg[AW-1:0];
    a_ce0      = issue;
    c_address0 = row_idx[D];
    c_ce0      = vld[D];
    c_we0      = vld[D];
    ap_done    = (state == ST_DONE);
    ap_ready   = (state == ST_DONE);
    ap_idle    = (state == ST_IDLE) && !ap_start;
  end

  // A write is never issued outside the pipeline state.
  assert property (@(posedge ap_clk) disable iff (ap_rst) c_we0 |-> state == ST_PIPE);
  assert property (@(posedge ap_clk) disable iff (ap_rst) a_ce0 |-> !exitcond);
endmodule
