// tb_i2c_clk_gen: self-checking testbench of the SCL timing reference at the
// default divide ratio of 512.
//
// Counts clk cycles between tick pulses: the first tick must come 128 cycles
// after reset is released, every following one 128 cycles (a quarter of a
// 512-cycle SCL period) after the previous, and each must last one cycle.
// Four ticks therefore make one 100 kbit/s bit period from 51.2 MHz.
module tb_i2c_clk_gen;

  localparam int CLK_DIV = 512;
  localparam int QUARTER = CLK_DIV / 4;

  logic clk = 1'b0, rst = 1'b1, tick;
  always #5 clk = ~clk;

  i2c_clk_gen dut (.clk, .rst, .tick);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int gap;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 40; n++) begin
      gap = 0;
      do begin
        @(posedge clk); #1;
        gap++;
      end while (!tick && gap < 4 * CLK_DIV);
      check(gap == QUARTER, $sformatf("tick %0d after %0d cycles, expected %0d", n, gap, QUARTER));
      @(posedge clk); #1;
      check(!tick, "tick lasts one cycle");
      // one cycle consumed by the width check
      gap = 1;
      while (!tick && gap < 4 * CLK_DIV) begin
        @(posedge clk); #1;
        gap++;
      end
      check(gap == QUARTER, $sformatf("tick spacing %0d, expected %0d", gap, QUARTER));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * CLK_DIV) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
