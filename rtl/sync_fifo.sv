// sync_fifo: single-clock first-in first-out buffer.
//
// WIDTH-bit entries, DEPTH entries (a power of two), stored in an array.
// `wr` pushes `din` when not full; `rd` pops when not empty; `dout` shows
// the oldest entry combinationally (first-word fall-through). `count`
// gives the fill level. Writing a full FIFO or reading an empty one is
// ignored and flagged by an assertion. A generic helper, this design's own.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr,
  input  logic [WIDTH-1:0]         din,
  input  logic                     rd,
  output logic [WIDTH-1:0]         dout,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire do_wr = wr && !full;
  wire do_rd = rd && !empty;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr && full))
    else $error("sync_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd && empty))
    else $error("sync_fifo: read while empty");
endmodule
