// i2c_master_controller: compact single-master I2C write controller.
//
// The host queues commands, each a 7-bit slave address and a data byte, by
// holding start high for one clock per command with addr_in/data_in valid.
// The commands wait in a 512-entry FIFO (i2c_fifo). The master FSM (i2c_fsm)
// pops one command whenever it is idle and runs a complete write transaction
// on the bus: START, address, R/W = 0, slave ACK, data byte, slave ACK, STOP.
// i2c_clk_gen sets the bit rate: one SCL period per CLK_DIV clk_in cycles
// (512, i.e. 100 kbit/s from 51.2 MHz).
//
// With READ_EN = 1 the controller also reads: a command pushed with rw_in
// high reads one byte from the slave (START, address, R/W = 1, slave ACK,
// byte from the slave, master NACK, STOP) and delivers it on rd_data_out with
// a one-clk rd_valid_out pulse. The FIFO word then holds the R/W bit as well
// (16 bits). With the default READ_EN = 0 the FIFO word is the 15-bit
// {address, data} of the write-only controller, rw_in is not used and
// rd_valid_out stays low.
//
// Interface: everything is synchronous to clk_in; reset_in is a synchronous
// active-high reset. The bus lines are open-drain: i2c_sda_o and i2c_scl_o
// are 0 to pull the line low and 1 to release it, and i2c_sda_i is the level
// on the SDA line (pull-ups and pads are outside this module). fifo_full is
// high when a push would be lost; ready_out is high while no transaction is
// running; nack_out is high when the last transaction was not acknowledged.
//
// Timing: a push is visible to the FSM on the next cycle; a transaction starts
// at the next bit-period boundary and takes 20 SCL periods.
//
// The FIFO plus FSM structure, the port set and the 15-bit FIFO word follow
// the controller's specification; split open-drain ports in place of inout
// pads, the nack_out flag, the FIFO depth and the read ports (rw_in,
// rd_data_out, rd_valid_out) are this design's choices.
module i2c_master_controller
  import i2c_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned CLK_DIV    = 512,
  parameter bit          READ_EN    = 1'b0
) (
  input  logic              clk_in,
  input  logic              reset_in,
  input  logic              start,
  input  logic [ADDR_W-1:0] addr_in,
  input  logic [DATA_W-1:0] data_in,
  input  logic              rw_in,
  input  logic              i2c_sda_i,
  output logic              i2c_sda_o,
  output logic              i2c_scl_o,
  output logic              fifo_full,
  output logic              ready_out,
  output logic              nack_out,
  output logic [DATA_W-1:0] rd_data_out,
  output logic              rd_valid_out
);

  localparam int unsigned FIFO_W = READ_EN ? CMD_W + 1 : CMD_W;

  i2c_cmd_t          cmd_in, cmd_out;
  logic [FIFO_W-1:0] fifo_din, fifo_dout;
  logic              fifo_empty, fifo_re, tick;

  assign cmd_in = '{rw: rw_in, addr: addr_in, data: data_in};

  // The FIFO stores the R/W bit only when reads are enabled.
  if (READ_EN) begin : g_rw
    assign fifo_din = cmd_in;
    assign cmd_out  = fifo_dout;
  end else begin : g_wo
    assign fifo_din = cmd_in[CMD_W-1:0];
    assign cmd_out  = {RW_WRITE, fifo_dout};
  end

  i2c_fifo #(
    .WIDTH (FIFO_W),
    .DEPTH (FIFO_DEPTH)
  ) u_fifo (
    .clk   (clk_in),
    .rst   (reset_in),
    .din   (fifo_din),
    .we    (start),
    .re    (fifo_re),
    .dout  (fifo_dout),
    .full  (fifo_full),
    .empty (fifo_empty)
  );

  i2c_clk_gen #(
    .CLK_DIV (CLK_DIV)
  ) u_clk_gen (
    .clk  (clk_in),
    .rst  (reset_in),
    .tick (tick)
  );

  i2c_fsm u_fsm (
    .clk        (clk_in),
    .rst        (reset_in),
    .tick       (tick),
    .fifo_empty (fifo_empty),
    .fifo_dout  (cmd_out),
    .fifo_re    (fifo_re),
    .sda_i      (i2c_sda_i),
    .sda_o      (i2c_sda_o),
    .scl_o      (i2c_scl_o),
    .ready      (ready_out),
    .nack       (nack_out),
    .rd_data    (rd_data_out),
    .rd_valid   (rd_valid_out)
  );

endmodule
