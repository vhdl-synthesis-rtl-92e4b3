// tb_mul16: checks the 16-bit truncating multiplier against 32-bit integer
// products for corner values and random operands. Combinational block: a
// small clock drives the stimulus and the watchdog.
module tb_mul16;
  import matvec_pkg::*;
  data_t a, b, p;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mul16 dut (.a(a), .b(b), .p(p));

  task automatic check(input data_t x, input data_t y);
    int full;
    a = x; b = y;
    #1;
    full = int'(x) * int'(y);
    checks++;
    if (p !== full[15:0]) begin
      failures++;
      $display("FAIL mul %0d * %0d: got %0d want %0d", x, y, p, $signed(full[15:0]));
    end
  endtask

  initial begin
    data_t corner [6] = '{16'sh0000, 16'sh0001, 16'shFFFF, 16'sh7FFF, 16'sh8000, 16'sh0100};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    repeat (2000) check(data_t'($urandom), data_t'($urandom));
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
