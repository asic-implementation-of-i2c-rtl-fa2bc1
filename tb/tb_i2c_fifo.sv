// tb_i2c_fifo: self-checking testbench of the command FIFO at its full size
// (15 bits x 512 entries).
//
// A queue is the reference model: a write is accepted while fewer than
// DEPTH-1 words are stored, a read while at least one is. The test fills the
// FIFO until full (511 words), checks that a further write is dropped, drains
// it in order until empty, checks that a read of an empty FIFO is ignored,
// then runs random simultaneous reads and writes. Every cycle it compares
// full, empty and the show-ahead dout with the model.
module tb_i2c_fifo;

  localparam int WIDTH = 15;
  localparam int DEPTH = 512;

  logic clk = 1'b0, rst = 1'b1, we = 1'b0, re = 1'b0;
  logic [WIDTH-1:0] din = '0, dout;
  logic full, empty;
  always #5 clk = ~clk;

  i2c_fifo dut (.clk, .rst, .din, .we, .re, .dout, .full, .empty);

  logic [WIDTH-1:0] model[$];
  int checks = 0, failures = 0;
  int full_seen = 0, empty_seen = 0, dropped_wr = 0, dropped_rd = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Compare outputs, then apply the cycle's operation to the model.
  task automatic step(input bit w, input bit r, input logic [WIDTH-1:0] d);
    bit mfull  = (model.size() == DEPTH - 1);
    bit mempty = (model.size() == 0);
    we = w; re = r; din = d;
    #1;
    check(full == mfull, $sformatf("full=%b, model holds %0d", full, model.size()));
    check(empty == mempty, $sformatf("empty=%b, model holds %0d", empty, model.size()));
    if (!mempty) check(dout == model[0], $sformatf("dout=%h expected %h", dout, model[0]));
    if (mfull) full_seen++;
    if (mempty) empty_seen++;
    if (w && mfull) dropped_wr++;
    if (r && mempty) dropped_rd++;
    @(posedge clk);
    if (r && !mempty) void'(model.pop_front());
    if (w && !mfull) model.push_back(d);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    step(1'b0, 1'b1, '0);                              // read while empty
    for (int i = 0; i < DEPTH + 4; i++) step(1'b1, 1'b0, WIDTH'($urandom));
    check(model.size() == DEPTH - 1, "filled to DEPTH-1 words");
    step(1'b1, 1'b1, 15'h1234);                        // read+write while full
    for (int i = 0; i < DEPTH + 4; i++) step(1'b0, 1'b1, '0);
    for (int i = 0; i < 20000; i++) step(1'($urandom), 1'($urandom), WIDTH'($urandom));
    // Reset clears the pointers.
    for (int i = 0; i < 5; i++) step(1'b1, 1'b0, WIDTH'(i));
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    model.delete();
    step(1'b0, 1'b0, '0);
    check(full_seen > 0 && empty_seen > 0 && dropped_wr > 0 && dropped_rd > 0,
          $sformatf("coverage: full %0d empty %0d dropped writes %0d dropped reads %0d",
                    full_seen, empty_seen, dropped_wr, dropped_rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
