// TTC signal interface (the daughter board standing in for a TTC receiver).
//
// The 16-bit TTC pattern arrives every 40 MHz clock. This block decodes it
// into the trigger strobe (BCSTRB), the DAQ start mark and the 12-bit bunch
// ID, and holds a latch that captures the whole word on the clock edge at
// which 'le' is high. The latched word is driven towards the Derandomizer's
// lower 16 data bits only while 'oe' is high; otherwise the output is zero
// (the board's tri-state bus becomes an explicit zero here).
//
// Timing: decoded fields are combinational from ttc_in; 'latched' changes on
// the edge that ends a clock with le = 1.
//
// The latch-enable / output-enable pair and the trigger + bunch ID content
// follow the prototype board; the bit positions (tgc_pkg::ttc_word_t) are
// this design's choice.
module ttc_interface
  import tgc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  ttc_word_t   ttc_in,
  input  logic        le,
  input  logic        oe,
  output logic        bcstrobe,
  output logic        start,
  output logic [11:0] bcid,
  output ttc_word_t   latched
);
  ttc_word_t hold;

  assign bcstrobe = ttc_in.bcstrobe;
  assign start    = ttc_in.start;
  assign bcid     = ttc_in.bcid;

  always_ff @(posedge clk) begin
    if (rst)     hold <= '0;
    else if (le) hold <= ttc_in;
  end

  assign latched = oe ? hold : '0;

endmodule
