// tb_i2c_fsm: self-checking testbench of the master FSM on its own.
//
// The testbench makes the quarter-period tick itself (every QUARTER clocks),
// models the show-ahead command FIFO with a queue, and puts the FSM on a
// wired-AND SDA line with one slave model (address 7'h2A). A bus monitor
// decodes every transaction. Checked per command: address byte = {addr, 0},
// data byte, both ACKs, the nack flag, ready, the START-to-STOP time
// (77 quarters for a full write, 41 when the address is refused), and the SCL
// high/low times (two quarters each). Commands cover an acknowledged write, an
// unknown address, a refused data byte, back-to-back commands and reads: for a
// read the address byte must carry R/W = 1, rd_data must equal the slave's
// byte with one rd_valid pulse, and the master must answer with NACK.
module tb_i2c_fsm;
  import i2c_pkg::*;

  localparam int QUARTER = 4;

  logic clk = 1'b0, rst = 1'b1, tick;
  int   qcnt;
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) begin qcnt <= 0; tick <= 1'b0; end
    else begin
      tick <= (qcnt == QUARTER - 1);
      qcnt <= (qcnt == QUARTER - 1) ? 0 : qcnt + 1;
    end
  end

  i2c_cmd_t cmdq[$];
  logic     fifo_empty, fifo_re, sda_o, scl_o, ready, nack, sda_bus;
  i2c_cmd_t fifo_dout;
  logic     slv_drive, nack_data, rx_valid, rx_is_addr, mack_valid, mack;
  logic [7:0] rx_byte, tx_data, rd_data;
  logic     rd_valid;

  assign fifo_empty = (cmdq.size() == 0);
  assign fifo_dout  = fifo_empty ? i2c_cmd_t'('0) : cmdq[0];
  // Pop half a cycle after the read strobe, so the FSM samples the queue
  // before it changes.
  logic pop_pending;
  always_ff @(posedge clk) pop_pending <= fifo_re;
  always @(negedge clk) if (pop_pending && cmdq.size() > 0) void'(cmdq.pop_front());

  assign sda_bus = sda_o & slv_drive;

  i2c_fsm dut (
    .clk, .rst, .tick, .fifo_empty, .fifo_dout, .fifo_re,
    .sda_i(sda_bus), .sda_o, .scl_o, .ready, .nack, .rd_data, .rd_valid
  );

  i2c_slave_model #(.ADDR(7'h2A)) slave (
    .clk, .rst, .scl(scl_o), .sda(sda_bus), .nack_data, .tx_data,
    .sda_drive(slv_drive), .rx_valid, .rx_byte, .rx_is_addr, .mack_valid, .mack
  );

  logic        done, addr_ack, data_ack;
  logic [7:0]  addr_byte, data_byte;
  int unsigned nbits, s2s, sh, sl, perr, starts;

  i2c_bus_monitor mon (
    .clk, .rst, .scl(scl_o), .sda(sda_bus), .done, .addr_byte, .addr_ack,
    .data_byte, .data_ack, .nbits, .start_to_stop(s2s), .scl_high(sh),
    .scl_low(sl), .proto_errors(perr), .starts
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int rd_pulses = 0, mack_seen = 0;
  logic [7:0] rd_last;
  always @(posedge clk) if (!rst) begin
    if (rd_valid) begin rd_pulses++; rd_last = rd_data; end
    if (mack_valid) begin
      mack_seen++;
      check(mack == 1'b1, "master answers a read byte with NACK");
    end
  end

  // Push one command, wait for its STOP, check what went over the bus.
  // For a read, d is the byte the slave sends.
  task automatic run_cmd(input logic [6:0] a, input logic [7:0] d, input bit dnack,
                         input bit rd = 1'b0);
    bit exp_aack = (a == 7'h2A);
    bit exp_nack = !exp_aack || (dnack && !rd);
    int rd0 = rd_pulses;
    nack_data = dnack;
    tx_data   = d;
    cmdq.push_back('{rw: rd, addr: a, data: rd ? 8'h00 : d});
    @(posedge clk iff done);
    check(addr_byte == {a, rd}, $sformatf("address byte %h, expected %h", addr_byte, {a, rd}));
    check(addr_ack == !exp_aack, $sformatf("address ACK bit %b for addr %h", addr_ack, a));
    if (exp_aack) begin
      check(nbits == 18, $sformatf("bits on bus %0d, expected 18", nbits));
      check(data_byte == d, $sformatf("data byte %h, expected %h", data_byte, d));
      check(data_ack == (dnack || rd), $sformatf("data ACK bit %b", data_ack));
      check(s2s == 77 * QUARTER, $sformatf("START->STOP %0d clocks, expected %0d", s2s, 77 * QUARTER));
    end else begin
      check(nbits == 9, $sformatf("bits on bus %0d, expected 9", nbits));
      check(s2s == 41 * QUARTER, $sformatf("START->STOP %0d clocks, expected %0d", s2s, 41 * QUARTER));
    end
    check(sh == 2 * QUARTER && sl == 2 * QUARTER, $sformatf("SCL high/low %0d/%0d", sh, sl));
    repeat (2) @(posedge clk);
    check(nack == exp_nack, $sformatf("nack flag %b, expected %b", nack, exp_nack));
    check(rd_pulses == rd0 + int'(rd && exp_aack), $sformatf("%0d rd_valid pulses", rd_pulses - rd0));
    if (rd && exp_aack) check(rd_last == d, $sformatf("read byte %h, expected %h", rd_last, d));
    repeat (4 * QUARTER) @(posedge clk);
    check(ready, "ready after STOP");
  endtask

  int slave_bytes = 0;
  always @(posedge clk) if (!rst && rx_valid) slave_bytes++;

  initial begin
    nack_data = 1'b0;
    tx_data   = 8'h00;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (10 * QUARTER) @(posedge clk);
    check(ready && scl_o && sda_o, "idle bus after reset");
    run_cmd(7'h2A, 8'hA5, 1'b0);
    run_cmd(7'h2A, 8'h3C, 1'b0);
    run_cmd(7'h11, 8'hFF, 1'b0);   // nobody answers
    run_cmd(7'h2A, 8'h5A, 1'b1);   // data byte refused
    run_cmd(7'h2A, 8'h00, 1'b0);   // nack cleared by next transaction
    run_cmd(7'h2A, 8'hC6, 1'b0, 1'b1);  // read
    run_cmd(7'h2A, 8'h01, 1'b0, 1'b1);  // read, last bit 1 then STOP
    run_cmd(7'h2A, 8'h80, 1'b0, 1'b1);  // read, MSB 1 then zeros
    run_cmd(7'h13, 8'h77, 1'b0, 1'b1);  // read from an absent slave
    run_cmd(7'h2A, 8'h99, 1'b0);        // write after read
    // Back-to-back: queue three commands at once.
    nack_data = 1'b0;
    cmdq.push_back('{rw: 1'b0, addr: 7'h2A, data: 8'h81});
    cmdq.push_back('{rw: 1'b0, addr: 7'h2A, data: 8'h42});
    cmdq.push_back('{rw: 1'b0, addr: 7'h2A, data: 8'h24});
    begin
      static logic [7:0] exp[3] = '{8'h81, 8'h42, 8'h24};
      for (int i = 0; i < 3; i++) begin
        @(posedge clk iff done);
        check(data_byte == exp[i] && data_ack == 1'b0, $sformatf("back-to-back byte %0d = %h", i, data_byte));
        check(!ready || i == 2, "no idle time between queued commands beyond one bit period");
      end
    end
    repeat (8 * QUARTER) @(posedge clk);
    check(perr == 0, $sformatf("%0d protocol errors", perr));
    check(starts == 13, $sformatf("%0d STARTs, expected 13", starts));
    check(slave_bytes == 13 + 3 + 2, $sformatf("slave acknowledged %0d bytes, expected 18", slave_bytes));
    check(mack_seen == 3, $sformatf("%0d master ACK slots seen by the slave, expected 3", mack_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
