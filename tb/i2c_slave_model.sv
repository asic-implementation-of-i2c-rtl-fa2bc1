// i2c_slave_model: behavioural I2C slave for the testbenches (not synthesised).
//
// Samples SCL/SDA on the system clock. After a START it shifts in eight bits
// on SCL rising edges; on the following SCL falling edge it decides whether to
// acknowledge: the address byte is acknowledged when its upper seven bits
// equal ADDR, a written data byte when nack_data is low. The ACK is held low
// for the ninth SCL pulse and released on its falling edge. Every byte it
// acknowledges is reported on rx_valid/rx_byte/rx_is_addr.
//
// When the address byte has R/W = 1, the slave transmits tx_data instead:
// each bit is put on SDA after an SCL falling edge, and after eight bits SDA
// is released for the master's ACK bit, which is reported on mack_valid/mack
// (0 = master acknowledged). An acknowledged slave sends tx_data again, as a
// real slave would send its next byte. A slave that was not addressed ignores
// the bus until the next START; STOP returns it to idle.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h50
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       scl,
  input  logic       sda,
  input  logic       nack_data,
  input  logic [7:0] tx_data,
  output logic       sda_drive,   // 0 pulls SDA low
  output logic       rx_valid,
  output logic [7:0] rx_byte,
  output logic       rx_is_addr,
  output logic       mack_valid,
  output logic       mack
);

  logic       scl_d, sda_d, active, addr_phase, reading;
  logic [3:0] bitn;
  logic [7:0] shreg, txsh;

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_d <= 1'b1; sda_d <= 1'b1; active <= 1'b0; addr_phase <= 1'b0; reading <= 1'b0;
      bitn <= '0; shreg <= '0; txsh <= '0; sda_drive <= 1'b1;
      rx_valid <= 1'b0; rx_byte <= '0; rx_is_addr <= 1'b0; mack_valid <= 1'b0; mack <= 1'b1;
    end else begin
      scl_d      <= scl;
      sda_d      <= sda;
      rx_valid   <= 1'b0;
      mack_valid <= 1'b0;
      if (scl && scl_d && sda_d && !sda) begin            // START
        active <= 1'b1; addr_phase <= 1'b1; reading <= 1'b0; bitn <= '0; sda_drive <= 1'b1;
      end else if (scl && scl_d && !sda_d && sda) begin   // STOP
        active <= 1'b0; reading <= 1'b0; bitn <= '0; sda_drive <= 1'b1;
      end else if (active && reading) begin               // slave transmits
        if (scl && !scl_d) begin
          if (bitn == 4'd8) begin
            mack_valid <= 1'b1;
            mack       <= sda;
          end
          bitn <= bitn + 4'd1;
        end else if (!scl && scl_d) begin
          if (bitn < 4'd8) begin
            sda_drive <= txsh[7];
            txsh      <= {txsh[6:0], 1'b1};
          end else if (bitn == 4'd8) begin
            sda_drive <= 1'b1;                            // master's ACK slot
          end else if (!mack) begin                       // acknowledged: next byte
            sda_drive <= tx_data[7];
            txsh      <= {tx_data[6:0], 1'b1};
            bitn      <= '0;
          end else begin
            active  <= 1'b0;
            reading <= 1'b0;
          end
        end
      end else if (active && scl && !scl_d) begin         // SCL rising
        if (bitn < 4'd8) begin
          shreg <= {shreg[6:0], sda};
          bitn  <= bitn + 4'd1;
        end
      end else if (active && !scl && scl_d) begin         // SCL falling
        if (bitn == 4'd8) begin
          bitn <= 4'd9;
          if (addr_phase ? (shreg[7:1] == ADDR) : !nack_data) begin
            sda_drive  <= 1'b0;
            rx_valid   <= 1'b1;
            rx_byte    <= shreg;
            rx_is_addr <= addr_phase;
          end else begin
            active <= 1'b0;
          end
        end else if (bitn == 4'd9) begin
          addr_phase <= 1'b0;
          if (addr_phase && shreg[0]) begin               // read: send first bit
            reading   <= 1'b1;
            sda_drive <= tx_data[7];
            txsh      <= {tx_data[6:0], 1'b1};
            bitn      <= '0;
          end else begin
            sda_drive <= 1'b1;
            bitn      <= '0;
          end
        end
      end
    end
  end

endmodule
