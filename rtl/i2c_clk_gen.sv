// i2c_clk_gen: SCL timing reference.
//
// Divides the board clock so that one SCL period lasts CLK_DIV board clocks
// (512 gives 100 kbit/s standard mode from a 51.2 MHz board clock). Instead of
// a second clock, it issues a one-cycle enable, tick, every CLK_DIV/4 board
// clocks: the master FSM splits each SCL bit period into four quarters and
// advances one quarter per tick, so the whole controller runs on the board
// clock alone.
//
// Interface: clk, rst (synchronous, active high), tick (high for one clk cycle
// every CLK_DIV/4 cycles; the first tick comes CLK_DIV/4 cycles after reset).
//
// The divide-by-512 ratio follows the controller's specification; the
// quarter-period enable in place of a divided clock is this design's choice.
module i2c_clk_gen #(
  parameter int unsigned CLK_DIV = 512
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned QUARTER = CLK_DIV / 4;
  localparam int unsigned CW      = (QUARTER > 1) ? $clog2(QUARTER) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(QUARTER - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  initial begin
    assert (CLK_DIV >= 8 && CLK_DIV % 4 == 0)
      else $error("i2c_clk_gen: CLK_DIV must be a multiple of 4 and at least 8");
  end

endmodule
