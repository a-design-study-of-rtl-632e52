// Synchronous FIFO memory: the storage of the Level 1 buffer (16 x 256) and
// of the Derandomizer (32 x 2048k).
//
// A dual-pointer circular buffer in one clock domain. A word presented with
// wen is stored at the rising edge; ren pops the oldest word into the dout
// register at the rising edge, so read data appear one clock after the read
// request (like a clocked FIFO chip). full blocks a write unless a read
// happens in the same clock; empty blocks a read. flush and rst empty the
// FIFO (pointers only, the contents are not cleared). count is the number of
// words held.
//
// The board is built around FIFO chips; their type and timing are not part
// of the design description, so this single-clock, registered-output FIFO
// is this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     flush,
  input  logic                     wen,
  input  logic [WIDTH-1:0]         din,
  input  logic                     ren,
  output logic [WIDTH-1:0]         dout,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign do_rd = ren && !empty;
  assign do_wr = wen && (!full || do_rd);

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      dout  <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) begin
        rptr <= next_ptr(rptr);
        dout <= mem[rptr];
      end
      count <= count + (($clog2(DEPTH)+1)'(do_wr)) - (($clog2(DEPTH)+1)'(do_rd));
    end
  end

  // A write into a full FIFO without a read is refused; the counter never
  // leaves its range.
  assert property (@(posedge clk) disable iff (rst) count <= ($clog2(DEPTH)+1)'(DEPTH));

endmodule
