// i2c_fifo: synchronous first-in first-out command buffer.
//
// DEPTH words of WIDTH bits held in a register array, addressed by a write
// pointer and a read pointer of $clog2(DEPTH) bits that wrap around. The FIFO
// is empty when the pointers are equal and full when the write pointer plus
// one equals the read pointer, so it holds at most DEPTH-1 words; a write
// when full and a read when empty are ignored. A write and a read in the same
// cycle are both performed.
//
// Interface: clk, rst (synchronous, active high, clears both pointers),
// din/we (write port), re (read port), dout (show-ahead: the oldest word is
// visible on dout, combinationally from the array, while empty is low; re
// advances to the next word at the clock edge), full, empty.
//
// The 15-bit word, the full/empty rules and the pointer reset follow the
// controller's specification. The depth of 512 is this design's choice; it
// matches the flip-flop count reported for the reference implementation
// (512 x 15 storage bits plus pointers and FSM). The show-ahead read port is
// also this design's choice.
module i2c_fifo #(
  parameter int unsigned WIDTH = 15,
  parameter int unsigned DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  input  logic             we,
  input  logic             re,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (wptr == rptr);
  assign full  = (PW'(wptr + 1'b1) == rptr);
  assign do_wr = we && !full;
  assign do_rd = re && !empty;
  assign dout  = mem[rptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= PW'(wptr + 1'b1);
      if (do_rd) rptr <= PW'(rptr + 1'b1);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("i2c_fifo: DEPTH must be a power of two >= 2");
  end

endmodule
