// tb_mem_bank: writes random words to a 16-word bank, then reads them back
// at random addresses, checking the one-clock read latency and that q
// holds its value while ce is low.
module tb_mem_bank;
  import matvec_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, ce = 0;
  logic [3:0] waddr = '0, raddr = '0;
  data_t wdata = '0, q;
  data_t model [DEPTH];
  int checks = 0, failures = 0;

  mem_bank #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      we = 1; waddr = 4'(k); wdata = data_t'($urandom); model[k] = wdata;
    end
    @(negedge clk) we = 0;
    repeat (200) begin
      int unsigned addr;
      data_t held;
      addr = $urandom_range(DEPTH - 1);
      @(negedge clk) begin ce = 1; raddr = 4'(addr); end
      @(negedge clk) ce = 0;
      checks++;
      if (q !== model[addr]) begin
        failures++; $display("FAIL read %0d: got %h want %h", addr, q, model[addr]);
      end
      // q must hold while ce is low, whatever the address
      held = q; raddr = raddr + 4'd1;
      @(negedge clk);
      checks++;
      if (q !== held) begin failures++; $display("FAIL q changed with ce low"); end
      // overwrite a word and check it
      we = 1; waddr = 4'(addr); wdata = data_t'($urandom); model[addr] = wdata;
      @(negedge clk) begin we = 0; ce = 1; raddr = 4'(addr); end
      @(negedge clk) ce = 0;
      checks++;
      if (q !== model[addr]) begin failures++; $display("FAIL rewrite %0d", addr); end
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
