// i2c_pkg: types and constants shared by the I2C master controller.
//
// A command queued by the host is one slave address (7 bits) and one data
// byte (8 bits): the 15-bit FIFO word of the write-only controller. With read
// transfers enabled the word grows by the R/W bit to 16 bits. The master FSM
// has eight states, one per phase of a single-byte transfer. Addressing is
// 7-bit, bytes go MSB first, and the R/W bit is 0 for a write and 1 for a
// read, as in the I2C protocol.
package i2c_pkg;

  localparam int unsigned ADDR_W = 7;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned CMD_W  = ADDR_W + DATA_W;  // 15-bit FIFO word

  localparam logic RW_WRITE = 1'b0;

  typedef struct packed {
    logic              rw;    // bit 15 (only stored when reads are enabled)
    logic [ADDR_W-1:0] addr;  // bits 14:8
    logic [DATA_W-1:0] data;  // bits 7:0, ignored by a read
  } i2c_cmd_t;

  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,  // bus free, SCL and SDA high
    ST_START = 3'd1,  // SDA falls while SCL is high
    ST_ADDR  = 3'd2,  // 7 address bits, MSB first
    ST_RW    = 3'd3,  // R/W bit
    ST_WACK  = 3'd4,  // slave acknowledges the address
    ST_DATA  = 3'd5,  // 8 data bits, MSB first, sent or received
    ST_WACK2 = 3'd6,  // ACK bit of the data byte
    ST_STOP  = 3'd7   // SDA rises while SCL is high
  } i2c_state_e;

endpackage
