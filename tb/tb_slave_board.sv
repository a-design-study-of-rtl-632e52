// End-to-end test of slave_board with a 32-word Derandomizer, so that the
// overflow (trigger dropped on a full Derandomizer) happens. The test body
// is in tb_slave_board_body.svh; see there for what is checked.
module tb_slave_board;
  import tgc_pkg::*;
  localparam int DR_DEPTH_TB     = 32;
  localparam int N_TRIG_RUN1     = 60;
  localparam bit EXPECT_NO_DROP  = 0;
  localparam int TRIG_PCT_RUN1   = 30;
  localparam int WATCHDOG_CYCLES = 200000;

  `include "tb_slave_board_body.svh"

  slave_board #(.DR_DEPTH(DR_DEPTH_TB)) dut (.*);
endmodule
