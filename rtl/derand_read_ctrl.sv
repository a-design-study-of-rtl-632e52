// VME read controller of the Derandomizer (offset 0x000, D32).
//
// A read cycle decoded by the VME interface arrives as a one-clock 'start'.
// The controller accepts address modifiers 09h/0Ah (single transfer) and
// 0Bh (block transfer); any other code gives a bus error. Words are popped
// lazily: each time the (synchronized) data strobe 'ds' is seen, one word is
// popped into the FIFO's output register and on the next clock the
// controller drives it ('oe') and raises 'dtack' until the master releases
// 'ds'. In a block transfer this repeats for every data strobe until the
// address strobe 'as' is released. A data strobe that finds the FIFO empty
// gets a bus error, which is held until the strobe goes away.
//
// Timing: dtack rises on the second rising clock edge after the data strobe
// arrives (the first edge samples it), i.e. 25-50 ns after the strobe at
// 40 MHz; the prototype measured about 40 ns.
//
// The AM codes, the empty check with bus error and the single/block
// handshakes follow the prototype board. Popping on the data strobe rather
// than after the previous acknowledge is this design's choice: it never
// loses a word when a block transfer ends.
module derand_read_ctrl
  import tgc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       as,
  input  logic       ds,
  input  logic [5:0] am,
  input  logic       empty,
  output logic       ren,
  output logic       oe,
  output logic       dtack,
  output logic       berr,
  output logic       busy
);
  typedef enum logic [2:0] {R_IDLE, R_WAIT_DS, R_ACK, R_ERR, R_ERR_ACK} rd_state_e;

  rd_state_e state, state_nx;
  logic      blk, blk_nx;

  always_comb begin
    state_nx = state;
    blk_nx   = blk;
    ren      = 1'b0;
    unique case (state)
      R_IDLE: begin
        if (start) begin
          blk_nx = am_is_block(am);
          if (!am_is_single(am) && !am_is_block(am)) begin
            state_nx = ds ? R_ERR_ACK : R_ERR;
          end else if (ds) begin
            if (empty) state_nx = R_ERR_ACK;
            else begin
              ren      = 1'b1;
              state_nx = R_ACK;
            end
          end else begin
            state_nx = R_WAIT_DS;
          end
        end
      end
      R_WAIT_DS: begin
        if (!as) state_nx = R_IDLE;
        else if (ds) begin
          if (empty) state_nx = R_ERR_ACK;
          else begin
            ren      = 1'b1;
            state_nx = R_ACK;
          end
        end
      end
      R_ACK: begin
        if (!ds) state_nx = blk ? R_WAIT_DS : R_IDLE;
      end
      R_ERR: begin
        if (!as)     state_nx = R_IDLE;
        else if (ds) state_nx = R_ERR_ACK;
      end
      R_ERR_ACK: begin
        if (!ds) state_nx = R_IDLE;
      end
      default: state_nx = R_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= R_IDLE;
      blk   <= 1'b0;
    end else begin
      state <= state_nx;
      blk   <= blk_nx;
    end
  end

  assign oe    = (state == R_ACK);
  assign dtack = (state == R_ACK);
  assign berr  = (state == R_ERR_ACK);
  assign busy  = (state != R_IDLE);

  // Acknowledge and bus error are exclusive.
  assert property (@(posedge clk) disable iff (rst) !(dtack && berr));

endmodule
