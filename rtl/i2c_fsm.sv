// i2c_fsm: I2C master finite state machine.
//
// One FSM does the work that a generic controller spreads over a clock
// generator, a START/STOP controller, a bit counter and a sequencer. It has
// eight states, one per phase of a single-byte transfer:
//
//   IDLE -> START -> ADDR (7 bits) -> RW -> WACK -> DATA (8 bits) -> WACK2 -> STOP -> IDLE
//
// The R/W bit of the command selects the direction. A write sends the data
// byte in DATA and checks the slave's ACK in WACK2. A read releases SDA in
// DATA and shifts in the slave's byte, sampled like an ACK bit; in WACK2 the
// master answers with NACK (SDA released), the I2C way of telling the slave
// that this was the last byte, and then sends STOP. The received byte appears
// on rd_data with a one-clk rd_valid pulse at the end of WACK2.
//
// Every bit period is split into four quarters q0..q3, one quarter per tick
// from i2c_clk_gen. SCL is low in q0/q1 and high in q2/q3. Data bits are put
// on SDA in q1, in the middle of the SCL low phase, so SDA never changes
// while SCL is high except in START (SDA falls at q2) and STOP (SDA rises at
// q3). In WACK/WACK2 the FSM releases SDA and samples it, through a two-flop
// synchroniser, at the end of q3; a low level is an ACK. A NACK on the address
// skips the data byte and goes straight to STOP; a NACK on the address or on
// a written byte sets nack until the next transaction starts.
//
// Interface: tick advances the FSM by one quarter. In IDLE, at the end of a
// bit period with fifo_empty low, the FSM pulses fifo_re for one clk and
// latches the command on fifo_dout (show-ahead FIFO). sda_o/scl_o are the
// registered open-drain controls (0 = pull low, 1 = release); sda_i is the
// sensed SDA level. ready is high in IDLE.
//
// Timing: a transaction lasts 20 bit periods (START, 7 address bits, R/W,
// ACK, 8 data bits, ACK, STOP), or 11 when the address is not acknowledged,
// plus up to one bit period in IDLE before it starts.
//
// The state list, the write and read sequences, MSB-first order and the ACK
// checks follow the controller's specification. The quarter-period scheme,
// the abort on NACK, the nack flag and the rd_data/rd_valid outputs are this
// design's choices. So is the NACK after the read byte: the specification has
// the master acknowledge it, but a slave that is acknowledged goes on driving
// the next byte and could hold SDA low through the STOP.
module i2c_fsm
  import i2c_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     tick,
  // command FIFO side
  input  logic     fifo_empty,
  input  i2c_cmd_t fifo_dout,
  output logic     fifo_re,
  // I2C lines
  input  logic     sda_i,
  output logic     sda_o,
  output logic     scl_o,
  // status
  output logic     ready,
  output logic     nack,
  // read data
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_valid
);

  i2c_state_e        state;
  logic [1:0]        q;        // quarter of the current bit period
  logic [2:0]        bitcnt;   // bits left in ADDR / DATA minus one
  logic [7:0]        shreg;    // bits being sent, MSB on the line
  logic [DATA_W-1:0] data_q;   // data byte of the current command
  logic              rw_q;     // current command is a read
  logic [1:0]        sda_sync;
  logic              end_bit;  // last tick of a bit period
  logic              scl_c, sda_c;

  assign end_bit = tick && (q == 2'd3);
  assign fifo_re = end_bit && (state == ST_IDLE) && !fifo_empty;
  assign ready   = (state == ST_IDLE);

  // Line levels wanted for the current state and quarter.
  always_comb begin
    scl_c = q[1];
    sda_c = 1'b1;
    unique case (state)
      ST_IDLE:  scl_c = 1'b1;
      ST_START: begin scl_c = 1'b1; sda_c = !q[1]; end
      ST_ADDR,
      ST_RW:    sda_c = shreg[7];
      ST_DATA:  sda_c = rw_q ? 1'b1 : shreg[7];
      ST_WACK,
      ST_WACK2: sda_c = 1'b1;
      ST_STOP:  sda_c = (q == 2'd3);
      default:  ;
    endcase
  end

  // Registered line drivers. SDA keeps its level through q0 of a bit period
  // so that it only moves once SCL is low.
  always_ff @(posedge clk) begin
    if (rst) begin
      scl_o <= 1'b1;
      sda_o <= 1'b1;
    end else begin
      scl_o <= scl_c;
      if (q != 2'd0 || state == ST_IDLE || state == ST_START) sda_o <= sda_c;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) sda_sync <= 2'b11;
    else     sda_sync <= {sda_sync[0], sda_i};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= ST_IDLE;
      q      <= 2'd0;
      bitcnt <= '0;
      shreg  <= '0;
      data_q <= '0;
      rw_q   <= RW_WRITE;
      nack   <= 1'b0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else if (!tick) begin
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      q <= q + 2'd1;
      if (end_bit) begin
        unique case (state)
          ST_IDLE: if (!fifo_empty) begin
            shreg  <= {fifo_dout.addr, fifo_dout.rw};
            data_q <= fifo_dout.data;
            rw_q   <= fifo_dout.rw;
            nack   <= 1'b0;
            state  <= ST_START;
          end
          ST_START: begin
            bitcnt <= 3'(ADDR_W - 1);
            state  <= ST_ADDR;
          end
          ST_ADDR: begin
            shreg <= {shreg[6:0], 1'b0};
            if (bitcnt == 3'd0) state <= ST_RW;
            else bitcnt <= bitcnt - 3'd1;
          end
          ST_RW: state <= ST_WACK;
          ST_WACK: begin
            if (!sda_sync[1]) begin
              shreg  <= data_q;
              bitcnt <= 3'(DATA_W - 1);
              state  <= ST_DATA;
            end else begin
              nack  <= 1'b1;
              state <= ST_STOP;
            end
          end
          ST_DATA: begin
            shreg <= {shreg[6:0], 1'b0};
            if (rw_q) rd_data <= {rd_data[DATA_W-2:0], sda_sync[1]};
            if (bitcnt == 3'd0) state <= ST_WACK2;
            else bitcnt <= bitcnt - 3'd1;
          end
          ST_WACK2: begin
            if (rw_q) rd_valid <= 1'b1;
            else if (sda_sync[1]) nack <= 1'b1;
            state <= ST_STOP;
          end
          ST_STOP: state <= ST_IDLE;
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

  // The FSM only pops a non-empty FIFO, and only leaves a state at the end
  // of a bit period.
  a_pop_nonempty: assert property (@(posedge clk) disable iff (rst) fifo_re |-> !fifo_empty);
  a_state_on_tick: assert property (@(posedge clk) disable iff (rst)
                                    !end_bit |=> $stable(state));
  // SDA only moves while SCL stays high to make a START or a STOP.
  a_sda_rule: assert property (@(posedge clk) disable iff (rst)
                               (scl_o && $past(scl_o) && sda_o != $past(sda_o))
                               |-> $past(state) inside {ST_START, ST_STOP});

endmodule
