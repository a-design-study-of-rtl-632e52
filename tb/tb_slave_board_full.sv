// End-to-end test of slave_board at its default sizes: 256-word Level 1
// buffer and 2048k-word Derandomizer. One complete operation of the board:
// VME test of the Derandomizer, a data-taking run with a trigger in every
// bunch crossing until all 2048k words are filled and further triggers are
// dropped, read-out of every stored word (block transfers), read-out during
// data taking, and the resets. The test body is in tb_slave_board_body.svh.
module tb_slave_board_full;
  import tgc_pkg::*;
  localparam int DR_DEPTH_TB     = tgc_pkg::DR_DEPTH;
  localparam int N_TRIG_RUN1     = DR_DEPTH_TB + 100;
  localparam bit EXPECT_NO_DROP  = 0;
  localparam int TRIG_PCT_RUN1   = 100;
  localparam int WATCHDOG_CYCLES = 40000000;

  `include "tb_slave_board_body.svh"

  slave_board dut (.*);
endmodule
