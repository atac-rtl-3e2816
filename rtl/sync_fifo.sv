// sync_fifo: single-clock first-in first-out buffer, the storage used for router input
// buffers, the Hub's sender-specific receive FIFOs and the tiles' BNet receive buffers.
//
// A circular array with read and write pointers and an occupancy count. push is taken when
// not full, pop when not empty; both may happen in one cycle. The head entry is visible on
// rd_data combinationally. full, empty and count depend only on the registered count, so a
// sender may use !full as its ready without a combinational path through the receiver.
// DEPTH must be a power of two. All of this is a choice of this design.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     wr_data,
  input  logic pop,
  output T     rd_data,
  output logic full,
  output logic empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign full    = (count == DEPTH[$clog2(DEPTH):0]);
  assign empty   = (count == '0);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push && !full) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop && !empty) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + {{$clog2(DEPTH){1'b0}}, (push && !full)}
                     - {{$clog2(DEPTH){1'b0}}, (pop && !empty)};
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
