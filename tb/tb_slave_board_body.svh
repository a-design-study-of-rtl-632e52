// Shared body of the end-to-end testbenches of slave_board. The including
// module declares DR_DEPTH_TB, N_TRIG_RUN1 and the dut instance.
//
// A behavioural VME master and a front-end pattern source (standing in for
// the pattern generator of the test set-up) drive the board. The expected
// Derandomizer contents are computed from the driven patterns alone: a
// trigger strobe in clock t, once the pipeline streams, stores
// {front-end word of clock t - LEN, TTC word of clock t}, as long as fewer
// than DR_DEPTH words are held. Mechanisms exercised and counted: VME test
// writes (single and block), single and block reads, bus errors, run/stop
// toggles, FIFO and system resets, pipeline start and streaming, stored,
// discarded and dropped (Derandomizer full) triggers, and read-out while
// data are being taken.

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
  // mechanism counters
  int n_test_wr = 0, n_single_rd = 0, n_block_rd = 0, n_berr = 0, n_toggle = 0;
  int n_fifo_rst = 0, n_sys_rst = 0, n_runs = 0, n_stored = 0, n_dropped = 0;
  int n_discarded = 0, n_concurrent = 0;

  vme_master u_m (
    .clk(clk), .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n),
    .lword_n(vme_lword_n), .iack_n(vme_iack_n), .am(vme_am), .addr(vme_addr),
    .d_out(vme_d_in), .d_in(vme_d_out), .d_oe(vme_d_oe),
    .dtack_n(vme_dtack_n), .berr_n(vme_berr_n));

  always #12.5 clk = ~clk;  // 40 MHz

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------- front-end pattern source and reference model ----------------
  int          cyc = 0;
  logic [15:0] ppg_hist[int];
  bit          trig_en = 0, start_req = 0;
  int          trig_pct = 20;
  int          run_from = -1, cur_len = 254;
  logic [31:0] expected[$];
  int          wen_cyc = -1, ren_cyc = -1;
  bit          exp_wen[int];      // clocks in which dr_wen must be high

  always @(negedge clk) begin
    logic trig;
    // Timing monitors (Fig. 13 / Fig. 14 of the prototype's measurements):
    // clock k runs from the rising edge after the inputs for k are driven
    // to the next one, so the registered outputs seen here, half-way into
    // the new clock, belong to clock cyc + 1.
    if (rst_n) begin
      if (l1b_wen && wen_cyc < 0) wen_cyc = cyc + 1;
      if (l1b_ren && ren_cyc < 0) ren_cyc = cyc + 1;
      if (dr_wen || exp_wen.exists(cyc + 1)) begin
        checks++;
        if (dr_wen != exp_wen.exists(cyc + 1)) begin
          failures++;
          if (failures < 20) $display("FAIL: Derandomizer write %0b in clock %0d", dr_wen, cyc + 1);
        end
        exp_wen.delete(cyc + 1);
      end
    end
    cyc++;
    ppg_data = 16'($urandom);
    ppg_hist[cyc] = ppg_data;
    if (ppg_hist.exists(cyc - 400)) ppg_hist.delete(cyc - 400);
    trig = trig_en && (($urandom % 100) < trig_pct);
    ttc_in = '{spare: 2'b00, start: start_req, bcstrobe: trig, bcid: 12'(cyc)};
    if (start_req) begin
      run_from = cyc + cur_len + 1;
      start_req = 0;
    end
    if (trig && run_from > 0 && cyc >= run_from) begin
      if (expected.size() < DR_DEPTH_TB) begin
        expected.push_back({ppg_hist[cyc - cur_len], 16'(ttc_in)});
        n_stored++;
        exp_wen[cyc + 1] = 1;
      end else n_dropped++;
    end else if (run_from > 0 && cyc >= run_from) n_discarded++;
  end

  // ---------------- VME helpers ----------------
  task automatic vme_cmd(input logic [8:0] ofs);
    logic [31:0] rd; bit b; int lat;
    u_m.single(1, BASE + 32'(ofs), 6'h09, 0, rd, b, lat);
    check(!b && lat == 2, $sformatf("command %h: berr %0b lat %0d", ofs, b, lat));
    if (ofs == 9'h004) n_toggle++;
    if (ofs == 9'h018) n_fifo_rst++;
    if (ofs == 9'h01C) n_sys_rst++;
  endtask

  task automatic read_one(output logic [31:0] rd, output bit b);
    int lat;
    u_m.single(0, BASE, 6'h09, 0, rd, b, lat);
    if (b) n_berr++;
    else begin
      n_single_rd++;
      check(lat == 2, $sformatf("read latency %0d edges (exp 2)", lat));
    end
  endtask

  task automatic expect_read(input logic [31:0] exp);
    logic [31:0] rd; bit b;
    read_one(rd, b);
    check(!b && rd == exp, $sformatf("read %h exp %h (berr %0b)", rd, exp, b));
  endtask

  task automatic expect_block(input int n);
    logic [31:0] got[$]; bit bs[$]; int lats[$];
    u_m.block_read(BASE, n, got, bs, lats);
    n_block_rd++;
    check(got.size() == n, "block length");
    foreach (got[i]) begin
      check(!bs[i] && got[i] == expected[0], $sformatf("block read %h exp %h", got[i], expected[0]));
      void'(expected.pop_front());
    end
  endtask

  task automatic expect_empty();
    logic [31:0] rd; bit b;
    read_one(rd, b);
    check(b, "read of empty Derandomizer gives bus error");
  endtask

  // Start the pipeline and wait until it streams.
  task automatic start_run(input logic [3:0] sw);
    dip_len = sw;
    cur_len = 248 + ((sw > 8) ? 8 : int'(sw));
    wen_cyc = -1; ren_cyc = -1; run_from = -1;
    vme_cmd(9'h004);
    check(l1b_on, "pipeline switched on");
    repeat (3) @(negedge clk);
    start_req = 1;
    wait (l1b_running);
    repeat (2) @(negedge clk);
    n_runs++;
    check(ren_cyc - wen_cyc == cur_len,
          $sformatf("L1BWEN to L1BREN: %0d clocks, exp %0d (%0d %0d)", ren_cyc - wen_cyc, cur_len, wen_cyc, ren_cyc));
  endtask

  task automatic stop_run();
    trig_en = 0;
    @(negedge clk);
    @(negedge clk);
    vme_cmd(9'h004);
    check(!l1b_on && !l1b_running, "pipeline switched off");
    run_from = -1;
  endtask

  initial begin : watchdog
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, words[$];
    bit b, bs[$];
    int lat, lats[$], n;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(dr_empty && !l1b_on, "idle after reset");

    // ---- 1. Derandomizer test through VME: single and block writes, read back ----
    for (int i = 0; i < 3; i++) begin
      words.push_back($urandom);
      u_m.single(1, BASE, 6'h09, words[i], rd, b, lat);
      check(!b && lat == 3, $sformatf("test write latency %0d edges (exp 3)", lat));
      n_test_wr++;
    end
    begin
      logic [31:0] blk[$];
      for (int i = 0; i < 4; i++) blk.push_back($urandom);
      u_m.block_write(BASE, blk, bs, lats);
      foreach (bs[i]) check(!bs[i], "block test write beat");
      n_test_wr += 4;
      words = {words, blk};
    end
    expected = words;
    expect_read(expected.pop_front());
    expect_block(6);
    expect_empty();

    // ---- 2. FIFO reset clears stored words ----
    u_m.single(1, BASE, 6'h09, 32'hAAAA_0001, rd, b, lat); n_test_wr++;
    u_m.single(1, BASE, 6'h09, 32'hAAAA_0002, rd, b, lat); n_test_wr++;
    check(!dr_empty, "two test words held");
    vme_cmd(9'h018);
    check(dr_empty, "FIFO reset empties the Derandomizer");
    expect_empty();

    // ---- 3. Run 1: triggers until the Derandomizer overflows ----
    start_run(4'd6);                  // 254 steps, as in the prototype test
    u_m.single(1, BASE, 6'h09, 32'h0, rd, b, lat);
    check(b, "test write refused while the pipeline runs"); n_berr++;
    trig_en = 1; trig_pct = TRIG_PCT_RUN1;
    wait (n_stored + n_dropped >= N_TRIG_RUN1);
    stop_run();
    check(n_dropped > 0 || DR_DEPTH_TB > N_TRIG_RUN1, "overflow reached");
    check(dr_full == (expected.size() == DR_DEPTH_TB), "full flag");
    n = expected.size();
    for (int i = 0; i < 3 && expected.size() > 0; i++) expect_read(expected.pop_front());
    while (expected.size() > 0) expect_block((expected.size() > 50) ? 50 : expected.size());
    expect_empty();

    // ---- 4. System reset switches the pipeline off ----
    vme_cmd(9'h004);
    check(l1b_on, "on again");
    vme_cmd(9'h01C);
    check(!l1b_on && !l1b_running, "system reset stops the pipeline");

    // ---- 5. Run 2: read-out while data are taken (never full) ----
    start_run(4'd0);                  // 248 steps
    trig_en = 1; trig_pct = 2;
    for (int i = 0; i < 30; i++) begin
      repeat (40) @(negedge clk);
      if (expected.size() > 0) begin
        expect_read(expected.pop_front());
        n_concurrent++;
      end
    end
    stop_run();
    while (expected.size() > 0) expect_block((expected.size() > 50) ? 50 : expected.size());
    expect_empty();

    // ---- 6. Bus errors for unused offsets and the IEEE 1394 window ----
    u_m.single(0, BASE + 32'h100, 6'h09, 0, rd, b, lat);
    check(b, "IEEE 1394 window gives bus error"); n_berr++;
    u_m.single(1, BASE + 32'h00C, 6'h09, 0, rd, b, lat);
    check(b, "reserved offset gives bus error"); n_berr++;

    // ---- mechanism coverage ----
    $display("test_wr=%0d single_rd=%0d block_rd=%0d berr=%0d toggle=%0d fifo_rst=%0d sys_rst=%0d",
             n_test_wr, n_single_rd, n_block_rd, n_berr, n_toggle, n_fifo_rst, n_sys_rst);
    $display("runs=%0d stored=%0d discarded=%0d dropped=%0d concurrent_reads=%0d",
             n_runs, n_stored, n_discarded, n_dropped, n_concurrent);
    check(n_test_wr > 0,   "mechanism: VME test write");
    check(n_single_rd > 0, "mechanism: VME single read");
    check(n_block_rd > 0,  "mechanism: VME block read");
    check(n_berr > 0,      "mechanism: bus error");
    check(n_toggle > 0,    "mechanism: run/stop toggle");
    check(n_fifo_rst > 0,  "mechanism: FIFO reset");
    check(n_sys_rst > 0,   "mechanism: system reset");
    check(n_runs == 2,     "mechanism: pipeline start and streaming");
    check(n_stored > 0,    "mechanism: triggered word stored");
    check(n_discarded > 0, "mechanism: untriggered word discarded");
    check(n_dropped > 0 || EXPECT_NO_DROP, "mechanism: trigger dropped on a full Derandomizer");
    check(n_concurrent > 0, "mechanism: read-out during data taking");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
