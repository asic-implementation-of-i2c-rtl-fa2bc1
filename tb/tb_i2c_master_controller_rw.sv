// tb_i2c_master_controller_rw: end-to-end testbench of the controller with
// read transfers enabled (READ_EN = 1), at a fast bit rate (CLK_DIV = 16) and
// a small FIFO (DEPTH = 16) so that many mixed transfers fit in a short run.
//
// Two slave models share the wired-AND SDA line: 7'h50 acknowledges
// everything and returns a byte that changes after every read, 7'h3C
// acknowledges its address but refuses written bytes; address 7'h11 has no slave.
// The host pushes random reads and writes, in bursts that overrun the FIFO.
// Checked per transfer, in push order: address byte {addr, rw}, the written
// byte or the byte read, every ACK bit, nack_out, one rd_valid pulse per
// acknowledged read with the slave's byte on rd_data_out, the master's NACK
// after a read byte, START-to-STOP time and SCL high/low time. Each mechanism
// (write, read, address NACK, data NACK, FIFO full, read after write on the
// same slave) is counted and must occur.
module tb_i2c_master_controller_rw;
  import i2c_pkg::*;

  localparam int CLK_DIV = 16;
  localparam int DEPTH   = 16;
  localparam int QUARTER = CLK_DIV / 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic              start = 1'b0, rw_in = 1'b0;
  logic [ADDR_W-1:0] addr_in = '0;
  logic [DATA_W-1:0] data_in = '0;
  logic              sda_o, scl_o, fifo_full, ready_out, nack_out, sda_bus, rd_valid_out;
  logic [DATA_W-1:0] rd_data_out;
  logic              drv_a, drv_b;

  assign sda_bus = sda_o & drv_a & drv_b;

  i2c_master_controller #(
    .FIFO_DEPTH (DEPTH),
    .CLK_DIV    (CLK_DIV),
    .READ_EN    (1'b1)
  ) dut (
    .clk_in(clk), .reset_in(rst), .start, .addr_in, .data_in, .rw_in,
    .i2c_sda_i(sda_bus), .i2c_sda_o(sda_o), .i2c_scl_o(scl_o),
    .fifo_full, .ready_out, .nack_out, .rd_data_out, .rd_valid_out
  );

  logic       rxv_a, rxa_a, rxv_b, rxa_b, mv_a, m_a, mv_b, m_b;
  logic [7:0] rxb_a, rxb_b, tx_a = 8'h00;

  i2c_slave_model #(.ADDR(7'h50)) slave_a (
    .clk, .rst, .scl(scl_o), .sda(sda_bus), .nack_data(1'b0), .tx_data(tx_a),
    .sda_drive(drv_a), .rx_valid(rxv_a), .rx_byte(rxb_a), .rx_is_addr(rxa_a),
    .mack_valid(mv_a), .mack(m_a)
  );
  i2c_slave_model #(.ADDR(7'h3C)) slave_b (
    .clk, .rst, .scl(scl_o), .sda(sda_bus), .nack_data(1'b1), .tx_data(8'h3C),
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
  int n_wr = 0, n_rd = 0, n_addr_nack = 0, n_data_nack = 0, n_full = 0, n_rd_after_wr = 0;
  int n_rdv = 0, n_mack = 0;
  i2c_cmd_t expq[$];
  logic [7:0] rdq[$];
  bit last_a_write = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  // Slave 7'h50 returns a new byte after every read of it: tx_a + 8'h1D.
  always @(posedge clk) if (!rst && mv_a) tx_a <= tx_a + 8'h1D;

  // rd_valid_out comes at the end of the ACK slot, before STOP: the byte is
  // queued here and compared with the bus when the transfer ends.
  always @(posedge clk) if (!rst) begin
    if (mv_a || mv_b) begin
      n_mack++;
      check((mv_a ? m_a : m_b) == 1'b1, "master answers the read byte with NACK");
    end
    if (rd_valid_out) begin
      n_rdv++;
      rdq.push_back(rd_data_out);
    end
  end

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
        dack = c.rw || (c.addr == 7'h50);
        check(addr_byte == {c.addr, c.rw}, $sformatf("address byte %h, expected %h", addr_byte, {c.addr, c.rw}));
        check(addr_ack == !aack, $sformatf("address ACK bit %b for %h", addr_ack, c.addr));
        if (aack) begin
          check(nbits == 18, $sformatf("%0d bits on the bus, expected 18", nbits));
          check(s2s == 77 * QUARTER, $sformatf("START->STOP %0d clocks", s2s));
          if (c.rw) begin
            check(data_ack == 1'b1, "master NACK bit on the bus after a read byte");
            // the byte on the bus is what the slave sent; rd_data_out must match it
            if (rdq.size() == 0) check(1'b0, "no rd_valid_out pulse for a read");
            else check(rdq.pop_front() == data_byte, "rd_data_out equals the byte on the bus");
            if (c.addr == 7'h3C) check(data_byte == 8'h3C, "slave 7'h3C returns its fixed byte");
            n_rd++;
            if (c.addr == 7'h50 && last_a_write) n_rd_after_wr++;
          end else begin
            check(data_byte == c.data, $sformatf("data byte %h, expected %h", data_byte, c.data));
            check(data_ack == !dack, $sformatf("data ACK bit %b for %h", data_ack, c.addr));
            if (dack) n_wr++; else n_data_nack++;
          end
          if (c.addr == 7'h50) last_a_write = !c.rw;
        end else begin
          check(nbits == 9, $sformatf("%0d bits on the bus, expected 9", nbits));
          check(s2s == 41 * QUARTER, $sformatf("START->STOP %0d clocks", s2s));
          n_addr_nack++;
        end
        check(sh == 2 * QUARTER && sl == 2 * QUARTER, $sformatf("SCL high/low %0d/%0d clocks", sh, sl));
        nack_exp  <= !(aack && dack);
        nack_wait <= 3;
      end
    end
  end

  // Expected byte of each read of 7'h50, tracked independently of the DUT.
  logic [7:0] a_model = 8'h00;
  int         a_reads = 0;

  logic full_d = 1'b0;
  always @(posedge clk) if (!rst) begin
    full_d <= fifo_full;
    if (fifo_full && !full_d) n_full++;
  end

  task automatic push(input bit rd, input logic [6:0] a, input logic [7:0] d);
    start = 1'b1; rw_in = rd; addr_in = a; data_in = d;
    #1;
    if (!fifo_full) expq.push_back('{rw: rd, addr: a, data: d});
    @(posedge clk); #1;
    start = 1'b0;
  endtask

  function automatic logic [6:0] pick_addr(input int unsigned r);
    case (r % 4)
      0, 1:    return 7'h50;
      2:       return 7'h3C;
      default: return 7'h11;
    endcase
  endfunction

  // Bytes read from 7'h50 must form the sequence 0, 1D, 3A, ...
  always @(posedge clk) if (!rst) begin
    if (done && addr_ack == 1'b0 && addr_byte == {7'h50, 1'b1}) begin
      check(data_byte == a_model, $sformatf("read %0d of 7'h50 gave %h, expected %h", a_reads, data_byte, a_model));
      a_model <= a_model + 8'h1D;
      a_reads++;
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    n_full = 0;
    repeat (10) @(posedge clk); #1;
    check(ready_out && !fifo_full, "idle after reset");
    push(1'b0, 7'h50, 8'h12);
    push(1'b1, 7'h50, 8'h00);
    for (int burst = 0; burst < 100; burst++) begin
      static int n;
      n = 1 + $urandom_range(0, 24);
      for (int i = 0; i < n; i++) push(1'($urandom), pick_addr($urandom), 8'($urandom));
      repeat ($urandom_range(0, 40 * CLK_DIV)) @(posedge clk);
      #1;
    end
    wait (expq.size() == 0);
    repeat (8 * QUARTER) @(posedge clk); #1;
    check(ready_out && !fifo_full, "idle after the last transfer");
    check(rdq.size() == 0, "every read delivered on rd_data_out");
    check(n_rdv == n_rd, $sformatf("%0d rd_valid pulses for %0d reads", n_rdv, n_rd));
    check(n_mack == n_rd, $sformatf("%0d master ACK slots for %0d reads", n_mack, n_rd));
    check(perr == 0, $sformatf("%0d protocol errors", perr));
    check(starts == n_wr + n_rd + n_addr_nack + n_data_nack, "one START per transfer");
    $display("mechanisms: writes %0d, reads %0d, address NACKs %0d, data NACKs %0d, FIFO full %0d, read after write %0d",
             n_wr, n_rd, n_addr_nack, n_data_nack, n_full, n_rd_after_wr);
    check(n_wr > 0, "acknowledged write happened");
    check(n_rd > 0, "read happened");
    check(n_addr_nack > 0, "address NACK happened");
    check(n_data_nack > 0, "data NACK happened");
    check(n_full > 0, "FIFO full happened");
    check(n_rd_after_wr > 0, "read after write happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
