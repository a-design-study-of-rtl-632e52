// TGC read-out slave board (prototype): Level 1 buffer, Derandomizer, TTC
// interface and VME slave on one 40 MHz clock.
//
// Data flow: every clock the 16-bit front-end word (ppg_data) enters the
// Level 1 buffer, a FIFO run as a 248..256-step pipeline (dip_len), while
// the 16-bit TTC pattern (ttc_in) carries the bunch ID, the trigger strobe
// and the start mark. When the trigger strobe is high in clock t and the
// pipeline is streaming, the Derandomizer stores, one clock later, the
// 32-bit word {front-end word of clock t - LEN, TTC word of clock t}.
// Untriggered words fall out of the pipeline and are lost. A VME master
// toggles the pipeline on/off (offset 0x004), resets the FIFOs (0x018,
// 0x01C), reads stored words from offset 0x000 (single or block D32) and,
// with the pipeline off, writes test words to the same offset.
//
// Reset: rst_n (synchronous, active low) resets everything; a VME FIFO or
// system reset pulse resets the buffers and their control, and switches the
// pipeline off.
//
// Interface: plain VME signals with the data bus split into vme_d_in,
// vme_d_out and its drive enable vme_d_oe; status outputs for the front
// panel and for monitoring. The IEEE 1394 daughter-board window of the VME
// map answers with a bus error because that interface is not fitted.
//
// The structure follows the prototype board; the TTC bit layout, the board
// address (BASE_ADDR) and the FIFO behaviour are this design's choices.
module slave_board #(
  parameter int unsigned L1B_WIDTH = tgc_pkg::L1B_WIDTH,
  parameter int unsigned L1B_DEPTH = tgc_pkg::L1B_DEPTH,
  parameter int unsigned DR_DEPTH  = tgc_pkg::DR_DEPTH,
  parameter logic [31:0] BASE_ADDR = 32'h1000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // front end
  input  logic [15:0] ppg_data,
  input  tgc_pkg::ttc_word_t ttc_in,
  input  logic [3:0]  dip_len,
  // VME bus
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_lword_n,
  input  logic        vme_iack_n,
  input  logic [5:0]  vme_am,
  input  logic [31:1] vme_addr,
  input  logic [31:0] vme_d_in,
  output logic [31:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  output logic        vme_berr_n,
  // status
  output logic        led_access,
  output logic        l1b_on,
  output logic        l1b_running,
  output logic        l1b_wen,
  output logic        l1b_ren,
  output logic        dr_wen,
  output logic        dr_full,
  output logic        dr_empty
);
  logic rst, core_rst, soft_reset;

  assign rst      = !rst_n;
  assign core_rst = rst || soft_reset;

  // ---- TTC interface ----
  logic      ttc_le, ttc_oe, bcstrobe, ttc_start;
  logic [11:0] bcid;
  tgc_pkg::ttc_word_t ttc_latched;

  ttc_interface u_ttc (
    .clk      (clk),
    .rst      (core_rst),
    .ttc_in   (ttc_in),
    .le       (ttc_le),
    .oe       (ttc_oe),
    .bcstrobe (bcstrobe),
    .start    (ttc_start),
    .bcid     (bcid),
    .latched  (ttc_latched)
  );

  // ---- Level 1 buffer ----
  logic [L1B_WIDTH-1:0] l1b_dout;
  logic                 l1b_full, l1b_empty;

  l1_buffer #(.WIDTH(L1B_WIDTH), .DEPTH(L1B_DEPTH)) u_l1b (
    .clk     (clk),
    .rst     (core_rst),
    .on      (l1b_on),
    .dip_len (dip_len),
    .start   (ttc_start),
    .din     (ppg_data),
    .dout    (l1b_dout),
    .running (l1b_running),
    .wen     (l1b_wen),
    .ren     (l1b_ren),
    .full    (l1b_full),
    .empty   (l1b_empty)
  );

  // ---- Derandomizer ----
  tgc_pkg::dr_word_t        dr_q;
  logic                     dr_ren, dr_test_sel, dr_test_wen;
  logic [31:0]              dr_test_data;
  logic [$clog2(DR_DEPTH):0] dr_count;

  derandomizer #(.DEPTH(DR_DEPTH)) u_dr (
    .clk         (clk),
    .rst         (core_rst),
    .l1b_running (l1b_running),
    .trigger     (bcstrobe),
    .l1b_data    (l1b_dout),
    .ttc_latched (ttc_latched),
    .ttc_le      (ttc_le),
    .ttc_oe      (ttc_oe),
    .trig_wen    (dr_wen),
    .test_sel    (dr_test_sel),
    .test_wen    (dr_test_wen),
    .test_data   (dr_test_data),
    .ren         (dr_ren),
    .q           (dr_q),
    .full        (dr_full),
    .empty       (dr_empty),
    .count       (dr_count)
  );

  // ---- VME slave ----
  vme_interface #(.BASE_ADDR(BASE_ADDR)) u_vme (
    .clk          (clk),
    .rst          (rst),
    .vme_as_n     (vme_as_n),
    .vme_ds_n     (vme_ds_n),
    .vme_write_n  (vme_write_n),
    .vme_lword_n  (vme_lword_n),
    .vme_iack_n   (vme_iack_n),
    .vme_am       (vme_am),
    .vme_addr     (vme_addr),
    .vme_d_in     (vme_d_in),
    .vme_d_out    (vme_d_out),
    .vme_d_oe     (vme_d_oe),
    .vme_dtack_n  (vme_dtack_n),
    .vme_berr_n   (vme_berr_n),
    .dr_q         (dr_q),
    .dr_empty     (dr_empty),
    .dr_full      (dr_full),
    .dr_ren       (dr_ren),
    .dr_test_sel  (dr_test_sel),
    .dr_test_wen  (dr_test_wen),
    .dr_test_data (dr_test_data),
    .l1b_on       (l1b_on),
    .soft_reset   (soft_reset),
    .led_access   (led_access)
  );

endmodule
