// Shared types and constants of the TGC read-out slave board.
//
// The board stores the 16-bit front-end word of each 40 MHz bunch crossing
// in a Level 1 buffer pipeline and, on a trigger, copies the delayed word
// together with the 16-bit TTC word into a 32-bit Derandomizer FIFO that a
// VME master reads out. This package holds the word formats, the VME
// register map and address-modifier codes used by several modules.
//
// Sizes (16 x 256 Level 1 buffer, 32 x 2048k Derandomizer, pipeline length
// 248..256) and the register offsets follow the prototype board. The bit
// positions inside the TTC pattern word are this design's choice: the only
// fixed fields are the trigger strobe and the 12-bit bunch ID.
package tgc_pkg;

  // ---- Level 1 buffer ----
  localparam int unsigned L1B_WIDTH   = 16;
  localparam int unsigned L1B_DEPTH   = 256;
  localparam int unsigned L1B_LEN_MIN = 248;
  localparam int unsigned L1B_LEN_MAX = 256;

  // ---- Derandomizer: 32 bits x 2048k words ----
  localparam int unsigned DR_WIDTH = 32;
  localparam int unsigned DR_DEPTH = 2048 * 1024;

  // ---- TTC pattern word (16 bits) ----
  typedef struct packed {
    logic [1:0]  spare;     // unused lines
    logic        start;     // DAQ start mark: Level 1 buffer begins writing
    logic        bcstrobe;  // Level 1 trigger strobe (BCSTRB)
    logic [11:0] bcid;      // bunch crossing identifier
  } ttc_word_t;

  // One Derandomizer entry: DAQ word in the upper half, TTC word in the lower.
  typedef struct packed {
    logic [15:0] daq;
    ttc_word_t   ttc;
  } dr_word_t;

  // ---- VME register map (byte offsets inside the board's 512-byte window) ----
  localparam logic [8:0] OFS_DERAND   = 9'h000;  // read: pop Derandomizer, write: test word
  localparam logic [8:0] OFS_L1B_SW   = 9'h004;  // write: toggle Level 1 buffer run/stop
  localparam logic [8:0] OFS_FIFO_RST = 9'h018;  // write: FIFO reset
  localparam logic [8:0] OFS_SYS_RST  = 9'h01C;  // write: system reset
  // Offsets 0x100..0x1FF belong to the IEEE 1394 daughter board.

  // ---- VME address modifiers accepted for Derandomizer access (A32, D32) ----
  localparam logic [5:0] AM_A32_DATA  = 6'h09;  // single transfer
  localparam logic [5:0] AM_A32_PROG  = 6'h0A;  // single transfer
  localparam logic [5:0] AM_A32_BLOCK = 6'h0B;  // block transfer

  function automatic logic am_is_single(input logic [5:0] am);
    return (am == AM_A32_DATA) || (am == AM_A32_PROG);
  endfunction

  function automatic logic am_is_block(input logic [5:0] am);
    return am == AM_A32_BLOCK;
  endfunction

endpackage
