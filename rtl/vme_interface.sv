// VME slave interface of the read-out board (A32, D32, single and block).
//
// The VME master reads the Derandomizer and controls the board through a
// 512-byte window at BASE_ADDR:
//   0x000  read : pop one Derandomizer word (derand_read_ctrl)
//          write: store a test word into the Derandomizer (derand_write_ctrl)
//   0x004  write: toggle the Level 1 buffer run/stop switch (l1b_on)
//   0x018  write: FIFO reset      } both give a one-clock soft_reset, which
//   0x01C  write: system reset    } also clears l1b_on
//   0x100-0x1FF : IEEE 1394 daughter board, not fitted -> bus error
// Any other access addressed to the board (other offsets, reads of the
// command registers, interrupt acknowledge, not 32-bit aligned D32) gets a
// bus error. Command writes are acknowledged regardless of the address
// modifier; Derandomizer accesses check it.
//
// The asynchronous bus strobes, address, modifier and data are sampled by
// one register stage on the 40 MHz clock; a cycle starts on the clock in
// which the sampled address strobe first appears. DTACK/BERR of the three
// handlers (read, test write, commands) are merged into the active-low bus
// lines; vme_d_out/vme_d_oe stand for the board's data transceivers.
//
// The register map, the D32 access rule and the bus-error cases follow the
// prototype board. The board-address comparison against BASE_ADDR (the
// board used external comparators) and the single sampling stage are this
// design's choices.
module vme_interface
  import tgc_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'h1000_0000
) (
  input  logic        clk,
  input  logic        rst,
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
  // Derandomizer port
  input  logic [31:0] dr_q,
  input  logic        dr_empty,
  input  logic        dr_full,
  output logic        dr_ren,
  output logic        dr_test_sel,
  output logic        dr_test_wen,
  output logic [31:0] dr_test_data,
  // Board control
  output logic        l1b_on,
  output logic        soft_reset,
  output logic        led_access
);
  typedef enum logic [1:0] {C_IDLE, C_WAIT_DS, C_ACK, C_ERR} cmd_state_e;

  // ---- sampling stage ----
  logic        as_s, as_q, ds_s, write_s, lword_s, iack_s;
  logic [5:0]  am_r;
  logic [31:1] addr_r;
  logic [31:0] data_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s    <= 1'b0;
      as_q    <= 1'b0;
      ds_s    <= 1'b0;
      write_s <= 1'b0;
      lword_s <= 1'b0;
      iack_s  <= 1'b0;
      am_r    <= '0;
      addr_r  <= '0;
      data_r  <= '0;
    end else begin
      as_s    <= !vme_as_n;
      as_q    <= as_s;
      ds_s    <= !vme_ds_n[0] && !vme_ds_n[1];
      write_s <= !vme_write_n;
      lword_s <= !vme_lword_n;
      iack_s  <= !vme_iack_n;
      am_r    <= vme_am;
      addr_r  <= vme_addr;
      data_r  <= vme_d_in;
    end
  end

  // ---- decode ----
  logic       board_sel, access_ok, cyc_start;
  logic [8:0] ofs;
  logic       hit_dr, hit_sw, hit_frst, hit_srst;

  assign board_sel = (addr_r[31:9] == BASE_ADDR[31:9]);
  assign access_ok = !iack_s && !addr_r[1] && lword_s;
  assign cyc_start = as_s && !as_q && board_sel;
  assign ofs       = {addr_r[8:2], 2'b00};
  assign hit_dr    = (ofs == OFS_DERAND);
  assign hit_sw    = write_s && (ofs == OFS_L1B_SW);
  assign hit_frst  = write_s && (ofs == OFS_FIFO_RST);
  assign hit_srst  = write_s && (ofs == OFS_SYS_RST);
  assign led_access = as_s && board_sel;

  logic rd_start, wr_start, cmd_start, err_start;
  assign rd_start  = cyc_start && access_ok && hit_dr && !write_s;
  assign wr_start  = cyc_start && access_ok && hit_dr && write_s;
  assign cmd_start = cyc_start && access_ok && (hit_sw || hit_frst || hit_srst);
  // Everything else addressed to the board, including the IEEE 1394
  // window (ofs[8] set), ends in a bus error.
  assign err_start = cyc_start && !(rd_start || wr_start || cmd_start);

  // ---- Derandomizer handlers ----
  logic rd_dtack, rd_berr, rd_busy, rd_oe;
  logic wr_dtack, wr_berr, wr_busy;

  derand_read_ctrl u_rd (
    .clk   (clk),
    .rst   (rst),
    .start (rd_start),
    .as    (as_s),
    .ds    (ds_s),
    .am    (am_r),
    .empty (dr_empty),
    .ren   (dr_ren),
    .oe    (rd_oe),
    .dtack (rd_dtack),
    .berr  (rd_berr),
    .busy  (rd_busy)
  );

  derand_write_ctrl u_wr (
    .clk    (clk),
    .rst    (rst),
    .start  (wr_start),
    .as     (as_s),
    .ds     (ds_s),
    .am     (am_r),
    .full   (dr_full),
    .l1b_on (l1b_on),
    .sel    (dr_test_sel),
    .wen    (dr_test_wen),
    .dtack  (wr_dtack),
    .berr   (wr_berr),
    .busy   (wr_busy)
  );

  assign dr_test_data = data_r;

  // ---- command registers and bus errors for everything else ----
  cmd_state_e cstate;
  logic       cmd_dtack, cmd_berr, cmd_err;

  always_ff @(posedge clk) begin
    if (rst) begin
      cstate     <= C_IDLE;
      cmd_err    <= 1'b0;
      l1b_on     <= 1'b0;
      soft_reset <= 1'b0;
    end else begin
      soft_reset <= 1'b0;
      unique case (cstate)
        C_IDLE: begin
          if (cmd_start) begin
            if (hit_sw) l1b_on <= !l1b_on;
            else begin
              soft_reset <= 1'b1;
              l1b_on     <= 1'b0;
            end
            cmd_err <= 1'b0;
            cstate  <= ds_s ? C_ACK : C_WAIT_DS;
          end else if (err_start) begin
            cmd_err <= 1'b1;
            cstate  <= ds_s ? C_ACK : C_WAIT_DS;
          end
        end
        C_WAIT_DS: begin
          if (!as_s)     cstate <= C_IDLE;
          else if (ds_s) cstate <= C_ACK;
        end
        C_ACK: begin
          if (!ds_s) cstate <= C_IDLE;
        end
        default: cstate <= C_IDLE;
      endcase
    end
  end

  assign cmd_dtack = (cstate == C_ACK) && !cmd_err;
  assign cmd_berr  = (cstate == C_ACK) &&  cmd_err;

  assign vme_dtack_n = !(rd_dtack || wr_dtack || cmd_dtack);
  assign vme_berr_n  = !(rd_berr  || wr_berr  || cmd_berr);
  assign vme_d_oe    = rd_oe;
  assign vme_d_out   = dr_q;

  // Only one handler is ever active in a bus cycle.
  assert property (@(posedge clk) disable iff (rst)
                   $onehot0({rd_busy, wr_busy, cstate != C_IDLE}));

endmodule
