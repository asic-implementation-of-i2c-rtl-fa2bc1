// tb_i2c_master_controller: end-to-end testbench of the whole controller at
// its default parameters (512-entry FIFO, SCL = clk_in / 512).
//
// The controller drives a wired-AND SDA line shared with two slave models:
// 7'h50 acknowledges everything, 7'h3C acknowledges its address but refuses
// every data byte; address 7'h11 has no slave. A bus monitor decodes each
// transaction. The host first queues a few commands one at a time, then
// pushes a burst of 520 commands on consecutive cycles, which overruns the
// FIFO, and waits until every accepted command has gone over the bus.
//
// Checked: every transaction, in order, carries exactly the accepted
// commands (address byte {addr, 0}, data byte), with the ACK bits and the
// nack_out flag the addressed slave implies; START-to-STOP lasts 77 quarter
// periods of 128 clocks (41 when the address is refused); SCL is high and low
// for 256 clocks each (100 kbit/s at 51.2 MHz); no protocol errors; ready_out
// is low during transactions; fifo_full rises and pushes are dropped while it
// is high. Each mechanism (acknowledged write, address NACK, data NACK, FIFO
// full with dropped push, FIFO drained to idle) is counted and must occur.
module tb_i2c_master_controller;
  import i2c_pkg::*;

  localparam int QUARTER = 512 / 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic              start = 1'b0;
  logic [ADDR_W-1:0] addr_in = '0;
  logic [DATA_W-1:0] data_in = '0;
  logic              sda_o, scl_o, fifo_full, ready_out, nack_out, sda_bus, rd_valid_out;
  logic [DATA_W-1:0] rd_data_out;
  logic              drv_a, drv_b;

  assign sda_bus = sda_o & drv_a & drv_b;

  i2c_master_controller dut (
    .clk_in(clk), .reset_in(rst), .start, .addr_in, .data_in,
    .rw_in(1'b0), .i2c_sda_i(sda_bus), .i2c_sda_o(sda_o), .i2c_scl_o(scl_o),
    .fifo_full, .ready_out, .nack_out, .rd_data_out, .rd_valid_out
  );

  logic       rxv_a, rxa_a, rxv_b, rxa_b, mv_a, m_a, mv_b, m_b;
  logic [7:0] rxb_a, rxb_b;

  i2c_slave_model #(.ADDR(7'h50)) slave_a (
    .clk, .rst, .scl(scl_o), .sda(sda_bus), .nack_data(1'b0), .tx_data(8'h00),
    .sda_drive(drv_a), .rx_valid(rxv_a), .rx_byte(rxb_a), .rx_is_addr(rxa_a),
    .mack_valid(mv_a), .mack(m_a)
  );
  i2c_slave_model #(.ADDR(7'h3C)) slave_b (
    .clk, .rst, .scl(scl_o), .sda(sda_bus), .nack_data(1'b1), .tx_data(8'h00),
    .sda_drive(drv_b), .rx_valid(rxv_b), .rx_byte(rxb_b), .rx_is_addr(rxa_b),
    .mack_valid(mv_b), .mack(m_b)
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
  int n_ack = 0, n_addr_nack = 0, n_data_nack = 0, n_full = 0, n_dropped = 0, n_idle = 0;
  i2c_cmd_t expq[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [6:0] pick_addr(input int unsigned r);
    case (r % 4)
      0, 1:    return 7'h50;
      2:       return 7'h3C;
      default: return 7'h11;
    endcase
  endfunction

  // Push one command on the next clock edge; record it if it was accepted.
  task automatic push(input logic [6:0] a, input logic [7:0] d);
    start = 1'b1; addr_in = a; data_in = d;
    #1;
    if (fifo_full) n_dropped++;
    else expq.push_back('{rw: 1'b0, addr: a, data: d});
    @(posedge clk); #1;
    start = 1'b0;
  endtask

  // Check every finished transaction against the oldest accepted command;
  // nack_out is checked a few clocks after STOP.
  logic nack_exp = 1'b0;
  int   nack_wait = 0;
  always @(posedge clk) if (!rst) begin
    if (nack_wait > 0) begin
      nack_wait <= nack_wait - 1;
      if (nack_wait == 1)
        check(nack_out == nack_exp, $sformatf("nack_out %b, expected %b", nack_out, nack_exp));
    end
    if (done) begin
      i2c_cmd_t c;
      bit aack, dack;
      if (expq.size() == 0) begin
        check(1'b0, "transaction with no command queued");
      end else begin
        c = expq.pop_front();
        aack = (c.addr == 7'h50) || (c.addr == 7'h3C);
        dack = (c.addr == 7'h50);
        check(addr_byte == {c.addr, RW_WRITE}, $sformatf("address byte %h, expected %h", addr_byte, {c.addr, 1'b0}));
        check(addr_ack == !aack, $sformatf("address ACK bit %b for %h", addr_ack, c.addr));
        if (aack) begin
          check(nbits == 18, $sformatf("%0d bits on the bus, expected 18", nbits));
          check(data_byte == c.data, $sformatf("data byte %h, expected %h", data_byte, c.data));
          check(data_ack == !dack, $sformatf("data ACK bit %b for %h", data_ack, c.addr));
          check(s2s == 77 * QUARTER, $sformatf("START->STOP %0d clocks", s2s));
          if (dack) n_ack++; else n_data_nack++;
        end else begin
          check(nbits == 9, $sformatf("%0d bits on the bus, expected 9", nbits));
          check(s2s == 41 * QUARTER, $sformatf("START->STOP %0d clocks", s2s));
          n_addr_nack++;
        end
        check(sh == 2 * QUARTER && sl == 2 * QUARTER, $sformatf("SCL high/low %0d/%0d clocks", sh, sl));
        check(!ready_out, "ready_out low until the FSM is back in IDLE");
        check(!rd_valid_out, "no read data in the write-only configuration");
        nack_exp  <= !(aack && dack);
        nack_wait <= 3;
      end
    end
  end

  logic full_d = 1'b0;
  always @(posedge clk) if (!rst) begin
    full_d <= fifo_full;
    if (fifo_full && !full_d) n_full++;
  end

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(posedge clk); #1;
    check(ready_out && scl_o && sda_o && !fifo_full, "idle after reset");
    // Single commands, one per slave behaviour, waiting for idle each time.
    push(7'h50, 8'hA5);
    push(7'h3C, 8'h5A);
    push(7'h11, 8'hC3);
    wait (expq.size() == 0);
    repeat (8 * QUARTER) @(posedge clk); #1;
    check(ready_out, "ready_out after the queue drained");
    if (ready_out) n_idle++;
    // Burst: more commands than the FIFO holds.
    for (int i = 0; i < 520; i++) push(pick_addr($urandom), 8'($urandom));
    check(n_dropped > 0, $sformatf("pushes dropped while full: %0d", n_dropped));
    check(expq.size() >= 511 && expq.size() <= 514, $sformatf("%0d commands accepted in the burst", expq.size()));
    wait (expq.size() == 0);
    repeat (8 * QUARTER) @(posedge clk); #1;
    check(ready_out && !fifo_full, "idle after the burst drained");
    if (ready_out) n_idle++;
    check(perr == 0, $sformatf("%0d protocol errors", perr));
    check(starts == n_ack + n_addr_nack + n_data_nack, "one START per transaction");
    $display("mechanisms: acked writes %0d, address NACKs %0d, data NACKs %0d, FIFO full %0d, dropped pushes %0d, drained to idle %0d",
             n_ack, n_addr_nack, n_data_nack, n_full, n_dropped, n_idle);
    check(n_ack > 0, "acknowledged write happened");
    check(n_addr_nack > 0, "address NACK happened");
    check(n_data_nack > 0, "data NACK happened");
    check(n_full > 0, "FIFO full happened");
    check(n_dropped > 0, "dropped push happened");
    check(n_idle == 2, "FIFO drained to idle happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
