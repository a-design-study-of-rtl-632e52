// VME test-write controller of the Derandomizer (offset 0x000, D32).
//
// Lets a VME master fill the Derandomizer with known words to test it. A
// write cycle decoded by the VME interface arrives as a one-clock 'start'.
// It is refused with a bus error when the address modifier is not
// 09h/0Ah/0Bh, the FIFO is full or the Level 1 buffer is switched on.
// Otherwise 'sel' switches the FIFO input to the VME data for the whole
// cycle; one set-up clock later, and once the data strobe 'ds' is seen, a
// one-clock 'wen' stores the word and 'dtack' is raised until the strobe is
// released. In a block transfer each further data strobe writes one more
// word, until the address strobe 'as' goes away; a strobe that finds the
// FIFO full gets a bus error.
//
// Timing: on the first word dtack rises on the third rising clock edge after
// the data strobe arrives (the first edge samples it), i.e. 50-75 ns at
// 40 MHz; the prototype measured about 70 ns. Later words of a block take
// two edges.
//
// The refusal conditions, the AM codes and the set-up clocks with the data
// path switched follow the prototype board; the exact number of set-up
// clocks is this design's choice.
module derand_write_ctrl
  import tgc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       as,
  input  logic       ds,
  input  logic [5:0] am,
  input  logic       full,
  input  logic       l1b_on,
  output logic       sel,
  output logic       wen,
  output logic       dtack,
  output logic       berr,
  output logic       busy
);
  typedef enum logic [2:0] {W_IDLE, W_SETUP, W_ACK, W_ERR, W_ERR_ACK} wr_state_e;

  wr_state_e state, state_nx;
  logic      blk, blk_nx;

  always_comb begin
    state_nx = state;
    blk_nx   = blk;
    wen      = 1'b0;
    unique case (state)
      W_IDLE: begin
        if (start) begin
          blk_nx = am_is_block(am);
          if ((!am_is_single(am) && !am_is_block(am)) || full || l1b_on)
            state_nx = ds ? W_ERR_ACK : W_ERR;
          else
            state_nx = W_SETUP;
        end
      end
      W_SETUP: begin
        if (!as) state_nx = W_IDLE;
        else if (ds) begin
          if (full) state_nx = W_ERR_ACK;
          else begin
            wen      = 1'b1;
            state_nx = W_ACK;
          end
        end
      end
      W_ACK: begin
        if (!ds) state_nx = blk ? W_SETUP : W_IDLE;
      end
      W_ERR: begin
        if (!as)     state_nx = W_IDLE;
        else if (ds) state_nx = W_ERR_ACK;
      end
      W_ERR_ACK: begin
        if (!ds) state_nx = W_IDLE;
      end
      default: state_nx = W_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= W_IDLE;
      blk   <= 1'b0;
    end else begin
      state <= state_nx;
      blk   <= blk_nx;
    end
  end

  assign sel   = (state == W_SETUP) || (state == W_ACK);
  assign dtack = (state == W_ACK);
  assign berr  = (state == W_ERR_ACK);
  assign busy  = (state != W_IDLE);

  assert property (@(posedge clk) disable iff (rst) !(dtack && berr));
  // A word is only ever written with the VME data path selected.
  assert property (@(posedge clk) disable iff (rst) wen |-> sel);

endmodule
