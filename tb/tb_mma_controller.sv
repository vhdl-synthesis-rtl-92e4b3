// tb_mma_controller: checks the controller at N=4 (final count 9). After a
// synchronous active-low reset the counter must count clock-enabled
// cycles from 0, the control bit must be high for exactly the enabled
// cycle in which the counter reads 2, CE low must freeze counter and
// state, and Rst must be ignored while CE is low.
module tb_mma_controller;
  logic clk = 0;
  always #5 clk = ~clk;
  logic CE = 1, Rst = 0;
  logic [31:0] counter;
  logic dXctl1Out;
  int checks = 0, failures = 0;
  int ctl_cycles;

  mma_controller #(.N(4)) dut (.*);

  task automatic run_once(input bit with_stalls);
    int expect_cnt;
    @(negedge clk) begin CE = 1; Rst = 0; end
    @(negedge clk) Rst = 1;
    expect_cnt = 0;
    ctl_cycles = 0;
    for (int t = 0; t < 40; t++) begin
      checks++;
      if (counter != 32'(expect_cnt)) begin
        failures++; $display("FAIL counter %0d want %0d", counter, expect_cnt);
      end
      checks++;
      if (dXctl1Out != (expect_cnt == 2)) begin
        failures++; $display("FAIL control %0d at count %0d", dXctl1Out, expect_cnt);
      end
      if (dXctl1Out && CE) ctl_cycles++;
      CE = with_stalls ? ($urandom_range(2) != 0) : 1'b1;
      // a reset request while CE is low must have no effect
      Rst = CE ? 1'b1 : 1'($urandom_range(1));
      @(negedge clk);
      if (CE) expect_cnt++;
    end
    checks++;
    if (ctl_cycles != 1) begin failures++; $display("FAIL control high for %0d enabled cycles", ctl_cycles); end
  endtask

  initial begin
    run_once(0);
    run_once(1);
    run_once(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
