// mma_controller: schedule controller of the recurrence-equation design.
//
// A free-running cycle counter and a four-state machine (init, true, false,
// final) raise the control bit dXctl1Out for exactly one clock: the time
// step at which the recurrence index j is 0 and every accumulator must
// start from zero instead of from its previous value.
//
//   init   leaves when counter == START_COUNT          control 0
//   true   leaves on the next count (one clock)        control 1
//   false  leaves when counter == FINAL_COUNT          control 0
//   final  absorbing                                   control 0
//
// Every register updates only when the clock enable CE is high. Rst is
// synchronous, active low, and sampled only with CE high; it clears the
// counter and returns to init. After Rst is released the control bit is
// high in the clock where counter == START_COUNT + 1 (2 by default).
// The counter saturates instead of wrapping. The state sequence and
// START_COUNT follow the generated controller of the document's size-4
// example; the one-clock true state, the FINAL_COUNT scaling and the
// saturation are this design's reading of it.
module mma_controller
  import matvec_pkg::*;
#(
  parameter int unsigned N           = MATSIZE,
  parameter int unsigned START_COUNT = 1,
  parameter int unsigned FINAL_COUNT = 2 * N + 1
) (
  input  logic        clk,
  input  logic        CE,
  input  logic        Rst,
  output logic [31:0] counter,
  output logic        dXctl1Out
);
  typedef enum logic [1:0] {
    S_INIT  = 2'b00,
    S_TRUE  = 2'b01,
    S_FALSE = 2'b10,
    S_FINAL = 2'b11
  } ctl_state_e;

  ctl_state_e cur, nxt;

  always_comb begin
    unique case (cur)
      S_INIT:  nxt = (counter == START_COUNT)     ? S_TRUE  : S_INIT;
      S_TRUE:  nxt = (counter == START_COUNT + 1) ? S_FALSE : S_TRUE;
      S_FALSE: nxt = (counter == FINAL_COUNT)     ? S_FINAL : S_FALSE;
      default: nxt = S_FINAL;
    endcase
  end

  always_ff @(posedge clk) begin
    if (CE) begin
      if (!Rst) begin
        counter <= '0;
        cur     <= S_INIT;
      end else begin
        if (counter != '1) counter <= counter + 1'b1;
        cur <= nxt;
      end
    end
  end

  always_comb dXctl1Out = (cur == S_TRUE);

  initial begin
    assert (FINAL_COUNT > START_COUNT + 1)
      else $error("mma_controller: FINAL_COUNT must follow the true state");
  end
endmodule
