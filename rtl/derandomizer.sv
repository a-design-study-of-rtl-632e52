// Derandomizer: the FIFO between the Level 1 buffer and the read-out.
//
// Triggers arrive at random times; the Derandomizer absorbs them so that the
// slower read-out can drain at its own pace. Only triggered bunch crossings
// are written; everything else leaving the Level 1 buffer is discarded.
//
// Trigger path: when the trigger strobe is high in clock t, the Level 1
// buffer is streaming and the FIFO has room (a write still in flight
// counted), ttc_le is raised in clock t
// (the TTC interface latches the word of clock t) and the write enable
// trig_wen is high in clock t + 1, storing {l1b_data, ttc_latched} at the end
// of that clock. ttc_oe equals trig_wen. A trigger that finds the FIFO full
// is dropped (no busy line is raised towards the trigger).
//
// Test path: with test_sel high the FIFO input is switched to the 32-bit
// test_data from VME and test_wen writes it. The VME controller only does
// this while the Level 1 buffer is stopped.
//
// Read port: ren pops one word into q (registered, one clock).
//
// Entry format (tgc_pkg::dr_word_t): [31:16] DAQ word, [15:0] TTC word, as
// on the prototype board. Trigger-to-write timing follows the board's
// "write enable one clock after the strobe". The drop-on-full rule follows
// the board's logic.
module derandomizer
  import tgc_pkg::*;
#(
  parameter int unsigned DEPTH = tgc_pkg::DR_DEPTH
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   l1b_running,
  input  logic                   trigger,
  input  logic [15:0]            l1b_data,
  input  ttc_word_t              ttc_latched,
  output logic                   ttc_le,
  output logic                   ttc_oe,
  output logic                   trig_wen,
  input  logic                   test_sel,
  input  logic                   test_wen,
  input  logic [31:0]            test_data,
  input  logic                   ren,
  output dr_word_t               q,
  output logic                   full,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count
);
  dr_word_t din;
  logic     wen;

  logic room;

  // Room for one more word, counting a trigger write still in flight.
  assign room   = (32'(count) + 32'(trig_wen)) < DEPTH;
  assign ttc_le = trigger && l1b_running && room;

  always_ff @(posedge clk) begin
    if (rst) trig_wen <= 1'b0;
    else     trig_wen <= ttc_le;
  end

  assign ttc_oe = trig_wen;

  always_comb begin
    if (test_sel) din = dr_word_t'(test_data);
    else          din = '{daq: l1b_data, ttc: ttc_latched};
  end

  assign wen = test_sel ? test_wen : trig_wen;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
    .clk   (clk),
    .rst   (rst),
    .flush (1'b0),
    .wen   (wen),
    .din   (din),
    .ren   (ren),
    .dout  (q),
    .full  (full),
    .empty (empty),
    .count (count)
  );

  // The test path and the trigger path never write in the same clock.
  assert property (@(posedge clk) disable iff (rst) !(test_sel && trig_wen));

endmodule
