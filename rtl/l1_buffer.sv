// Level 1 buffer: a FIFO run as a fixed-length pipeline.
//
// Every 40 MHz clock one 16-bit front-end word enters; the same word leaves
// LEN clocks later, when the Level 1 trigger decision for its bunch crossing
// is known. LEN is set by a 4-bit switch, LEN = LEN_MIN + min(dip_len, 8),
// giving the nine lengths 248..256 (6.2 to 6.4 us).
//
// Control (one FSM):
//   IDLE  - FIFO flushed; leaves when the run/stop switch 'on' is set.
//   ARMED - waits for the start mark; on it, write enable (wen) goes high.
//   FILL  - writes every clock and counts; after LEN clocks read enable
//           (ren) goes high as well.
//   RUN   - writes and reads every clock ('running'): occupancy stays LEN.
// Clearing 'on', a full FIFO while filling, or an empty FIFO while running
// returns the FSM to IDLE.
//
// Timing: wen rises on the clock after the start mark; ren rises exactly LEN
// clocks after wen. A word presented in clock n appears on dout in clock
// n + LEN + 1 (one clock of registered FIFO read). Relative to a trigger
// strobe sampled in clock t, dout in clock t + 1 holds the word of clock
// t - LEN, which is what the Derandomizer stores.
//
// The FIFO pipeline, the 248..256 length range and the start-then-count
// sequence follow the prototype board. The 4-bit switch coding, the flush in
// IDLE and the acceptance of length 256 (write while full with a
// simultaneous read) are this design's choices.
module l1_buffer #(
  parameter int unsigned WIDTH   = tgc_pkg::L1B_WIDTH,
  parameter int unsigned DEPTH   = tgc_pkg::L1B_DEPTH,
  parameter int unsigned LEN_MIN = tgc_pkg::L1B_LEN_MIN,
  parameter int unsigned LEN_MAX = tgc_pkg::L1B_LEN_MAX
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             on,
  input  logic [3:0]       dip_len,
  input  logic             start,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             running,
  output logic             wen,
  output logic             ren,
  output logic             full,
  output logic             empty
);
  localparam int unsigned CW = $clog2(LEN_MAX + 1);

  typedef enum logic [1:0] {IDLE, ARMED, FILL, RUN} l1b_state_e;

  l1b_state_e    state;
  logic [CW-1:0] cnt;
  logic [CW-1:0] len;
  logic [$clog2(DEPTH):0] fifo_count;

  // Switch decode: saturate so that every setting is a legal length.
  always_comb begin
    if (32'(dip_len) > LEN_MAX - LEN_MIN) len = CW'(LEN_MAX);
    else                                  len = CW'(LEN_MIN + 32'(dip_len));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      cnt   <= '0;
      wen   <= 1'b0;
      ren   <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          wen <= 1'b0;
          ren <= 1'b0;
          cnt <= '0;
          if (on) state <= ARMED;
        end
        ARMED: begin
          if (!on) begin
            state <= IDLE;
          end else if (start) begin
            state <= FILL;
            wen   <= 1'b1;
            cnt   <= CW'(1);
          end
        end
        FILL: begin
          if (!on || full) begin
            state <= IDLE;
            wen   <= 1'b0;
          end else begin
            cnt <= cnt + 1'b1;
            if (cnt == len) begin
              state <= RUN;
              ren   <= 1'b1;
            end
          end
        end
        RUN: begin
          if (!on || empty) begin
            state <= IDLE;
            wen   <= 1'b0;
            ren   <= 1'b0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign running = (state == RUN);

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
    .clk   (clk),
    .rst   (rst),
    .flush (state == IDLE),
    .wen   (wen),
    .din   (din),
    .ren   (ren),
    .dout  (dout),
    .full  (full),
    .empty (empty),
    .count (fifo_count)
  );

  // While streaming, the pipeline holds exactly LEN words.
  assert property (@(posedge clk) disable iff (rst)
                   (state == RUN && wen && ren) |-> (32'(fifo_count) == 32'(len)));

endmodule
