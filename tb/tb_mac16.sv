// tb_mac16: checks the multiplier-adder (in0*in1 + in2, truncated to 16
// bits) against 32-bit integer arithmetic for corner and random values.
module tb_mac16;
  import matvec_pkg::*;
  data_t in0, in1, in2, dout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mac16 dut (.in0(in0), .in1(in1), .in2(in2), .dout(dout));

  task automatic check(input data_t x, input data_t y, input data_t z);
    int full;
    in0 = x; in1 = y; in2 = z;
    #1;
    full = int'(x) * int'(y) + int'(z);
    checks++;
    if (dout !== full[15:0]) begin
      failures++;
      $display("FAIL mac %0d * %0d + %0d: got %0d want %0d", x, y, z, dout, $signed(full[15:0]));
    end
  endtask

  initial begin
    data_t corner [5] = '{16'sh0000, 16'sh0001, 16'shFFFF, 16'sh7FFF, 16'sh8000};
    foreach (corner[i]) foreach (corner[j]) foreach (corner[k]) check(corner[i], corner[j], corner[k]);
    repeat (3000) check(data_t'($urandom), data_t'($urandom), data_t'($urandom));
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
