// i2c_bus_monitor: passive I2C bus decoder for the testbenches.
//
// Samples SCL/SDA on the system clock and decodes one transaction from START
// to STOP: SDA is sampled on each SCL rising edge and the bit is counted on
// the falling edge that ends the pulse, grouped into frames of
// eight data bits plus the ACK bit. At STOP it pulses done with the first two
// frames (address byte, data byte) and their ACK bits (0 = acknowledged), the
// number of bits seen and the number of clk cycles from START to STOP. It
// counts a protocol error when SDA changes while SCL is high outside START and
// STOP (seen as a START inside a transaction or a STOP with a partial frame),
// and reports the SCL high and low times it last measured.
module i2c_bus_monitor (
  input  logic        clk,
  input  logic        rst,
  input  logic        scl,
  input  logic        sda,
  output logic        done,
  output logic [7:0]  addr_byte,
  output logic        addr_ack,
  output logic [7:0]  data_byte,
  output logic        data_ack,
  output int unsigned nbits,
  output int unsigned start_to_stop,
  output int unsigned scl_high,
  output int unsigned scl_low,
  output int unsigned proto_errors,
  output int unsigned starts
);

  logic       scl_d, sda_d, busy, bitval, have_bit;
  logic [8:0] frame0, frame1;
  int unsigned cyc, hcnt, lcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_d <= 1'b1; sda_d <= 1'b1; busy <= 1'b0; bitval <= 1'b1; have_bit <= 1'b0; done <= 1'b0;
      frame0 <= '0; frame1 <= '0; nbits <= 0; cyc <= 0;
      addr_byte <= '0; addr_ack <= 1'b1; data_byte <= '0; data_ack <= 1'b1;
      start_to_stop <= 0; scl_high <= 0; scl_low <= 0; hcnt <= 0; lcnt <= 0;
      proto_errors <= 0; starts <= 0;
    end else begin
      scl_d <= scl;
      sda_d <= sda;
      done  <= 1'b0;
      cyc   <= cyc + 1;
      if (scl) hcnt <= hcnt + 1; else lcnt <= lcnt + 1;
      if (scl && !scl_d) begin scl_low  <= lcnt; lcnt <= 0; end
      if (!scl && scl_d) begin scl_high <= hcnt; hcnt <= 0; end
      if (scl && scl_d && sda_d && !sda) begin            // START
        if (busy) proto_errors <= proto_errors + 1;
        busy <= 1'b1; have_bit <= 1'b0; nbits <= 0; cyc <= 0; starts <= starts + 1;
        frame0 <= '0; frame1 <= '0;
      end else if (scl && scl_d && !sda_d && sda) begin   // STOP
        if (!busy || nbits % 9 != 0) proto_errors <= proto_errors + 1;
        busy <= 1'b0;
        done <= 1'b1;
        addr_byte <= frame0[8:1]; addr_ack <= frame0[0];
        data_byte <= frame1[8:1]; data_ack <= frame1[0];
        start_to_stop <= cyc + 1;
      end else if (busy && scl && !scl_d) begin           // SCL rising: sample
        bitval <= sda;
        have_bit <= 1'b1;
      end else if (busy && have_bit && !scl && scl_d) begin  // SCL falling: commit
        have_bit <= 1'b0;
        if (nbits < 9)       frame0 <= {frame0[7:0], bitval};
        else if (nbits < 18) frame1 <= {frame1[7:0], bitval};
        nbits <= nbits + 1;
      end
    end
  end

endmodule
