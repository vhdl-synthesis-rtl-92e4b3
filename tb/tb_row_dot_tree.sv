// tb_row_dot_tree: random dot products on two trees, N=8 (purely
// combinational, EXTRA_STAGE defaults to 0) and N=16 (pipeline register,
// EXTRA_STAGE defaults to 1). The N=16 result must appear one clock after
// en samples the inputs, and must not change while en is low.
module tb_row_dot_tree;
  import matvec_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0;
  data_t a8 [8], b8 [8], a16 [16], b16 [16];
  data_t s8, s16;
  int checks = 0, failures = 0;

  row_dot_tree #(.N(8))  u8  (.clk, .en, .a(a8),  .b(b8),  .sum(s8));
  row_dot_tree #(.N(16)) u16 (.clk, .en, .a(a16), .b(b16), .sum(s16));

  function automatic data_t dot(input data_t x [], input data_t y []);
    int acc = 0;
    foreach (x[k]) acc += int'(x[k]) * int'(y[k]);
    return data_t'(acc[15:0]);
  endfunction

  initial begin
    data_t want16, held;
    data_t xa [], xb [];
    repeat (300) begin
      @(negedge clk);
      foreach (a8[k])  begin a8[k]  = data_t'($urandom); b8[k]  = data_t'($urandom); end
      foreach (a16[k]) begin a16[k] = data_t'($urandom); b16[k] = data_t'($urandom); end
      en = 1;
      #1;
      xa = new[8]; xb = new[8];
      foreach (a8[k]) begin xa[k] = a8[k]; xb[k] = b8[k]; end
      checks++;
      if (s8 !== dot(xa, xb)) begin failures++; $display("FAIL N=8: %0d want %0d", s8, dot(xa, xb)); end
      xa = new[16]; xb = new[16];
      foreach (a16[k]) begin xa[k] = a16[k]; xb[k] = b16[k]; end
      want16 = dot(xa, xb);
      @(negedge clk);
      en = 0;
      foreach (a16[k]) a16[k] = data_t'($urandom);   // inputs change, register holds
      #1;
      checks++;
      if (s16 !== want16) begin failures++; $display("FAIL N=16: %0d want %0d", s16, want16); end
      held = s16;
      @(negedge clk);
      checks++;
      if (s16 !== held) begin failures++; $display("FAIL N=16 changed with en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
