// Workload test of slave_board at its default sizes: the ATLAS Level 1
// accept rate of 100 kHz. Triggers arrive at random with probability 1/400
// per 25 ns clock (100 kHz on average), plus a burst of 32 back-to-back
// triggers, for 10 ms of beam time. Meanwhile a VME master keeps reading the
// Derandomizer with single D32 cycles, backing off for a while after each
// bus error (empty FIFO). Checks that every triggered word is read back
// correctly and in order ({front-end word of clock t - 254, TTC word of
// clock t}), that no trigger is dropped, and reports the average rate and
// the highest Derandomizer occupancy seen.
module tb_l1a_rate;
  import tgc_pkg::*;
  localparam int LEN       = 254;
  localparam int RUN_CLKS  = 400000;  // 10 ms at 40 MHz
  localparam int BURST_AT  = 200000;
  localparam int BURST_LEN = 32;

  logic clk = 0, rst_n = 0;
  logic [15:0] ppg_data = '0;
  ttc_word_t   ttc_in = '0;
  logic [3:0]  dip_len = 4'd6;
  logic        vme_as_n, vme_write_n, vme_lword_n, vme_iack_n;
  logic [1:0]  vme_ds_n;
  logic [5:0]  vme_am;
  logic [31:1] vme_addr;
  logic [31:0] vme_d_in, vme_d_out;
  logic        vme_d_oe, vme_dtack_n, vme_berr_n;
  logic        led_access, l1b_on, l1b_running, l1b_wen, l1b_ren, dr_wen, dr_full, dr_empty;
  localparam logic [31:0] BASE = 32'h1000_0000;

  int checks = 0, failures = 0;
  int cyc = 0, run_from = -1, n_trig = 0, n_read = 0, max_occ = 0, n_berr = 0;
  bit trig_en = 0, start_req = 0, done = 0;
  logic [15:0] hist[int];
  logic [31:0] expected[$];

  slave_board dut (.*);

  vme_master u_m (
    .clk(clk), .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n),
    .lword_n(vme_lword_n), .iack_n(vme_iack_n), .am(vme_am), .addr(vme_addr),
    .d_out(vme_d_in), .d_in(vme_d_out), .d_oe(vme_d_oe),
    .dtack_n(vme_dtack_n), .berr_n(vme_berr_n));

  always #12.5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (RUN_CLKS + 200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pattern source and reference model.
  always @(negedge clk) begin
    logic trig;
    cyc++;
    ppg_data = 16'($urandom);
    hist[cyc] = ppg_data;
    if (hist.exists(cyc - 400)) hist.delete(cyc - 400);
    trig = trig_en && (($urandom % 400) == 0 ||
                       (cyc - run_from >= BURST_AT && cyc - run_from < BURST_AT + BURST_LEN));
    ttc_in = '{spare: 2'b00, start: start_req, bcstrobe: trig, bcid: 12'(cyc)};
    if (start_req) begin run_from = cyc + LEN + 1; start_req = 0; end
    if (trig && run_from > 0 && cyc >= run_from) begin
      expected.push_back({hist[cyc - LEN], 16'(ttc_in)});
      n_trig++;
      if (expected.size() > max_occ) max_occ = expected.size();
    end
  end

  initial begin
    logic [31:0] rd; bit b; int lat;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    u_m.single(1, BASE + 4, 6'h09, 0, rd, b, lat);
    check(!b && l1b_on, "pipeline switched on");
    repeat (3) @(negedge clk);
    start_req = 1;
    wait (l1b_running);
    trig_en = 1;
    // read continuously until the run is over and everything is drained
    while (!(done && expected.size() == 0)) begin
      u_m.single(0, BASE, 6'h09, 0, rd, b, lat);
      if (b) begin
        n_berr++;
        repeat (20) @(negedge clk);
      end else begin
        check(expected.size() > 0, "read returned a word nobody triggered");
        if (expected.size() > 0) begin
          check(rd == expected[0], $sformatf("read %h exp %h", rd, expected[0]));
          void'(expected.pop_front());
        end
        n_read++;
      end
      if (cyc - run_from > RUN_CLKS) begin trig_en = 0; done = 1; end
    end
    check(n_read == n_trig, $sformatf("read %0d of %0d triggers", n_read, n_trig));
    check(n_trig > 900 && n_trig < 1200, $sformatf("about 1000 triggers in 10 ms (got %0d)", n_trig));
    check(!dr_full && dr_empty, "Derandomizer never needed to drop, now empty");
    check(max_occ >= BURST_LEN / 2, "burst was buffered by the Derandomizer");
    $display("triggers=%0d (%.1f kHz) reads=%0d max_occupancy=%0d empty_reads=%0d",
             n_trig, n_trig / 10.0, n_read, max_occ, n_berr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
