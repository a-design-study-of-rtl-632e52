// Self-checking test of vme_interface with a behavioural VME master and a
// queue standing in for the Derandomizer. Checks data, DTACK/BERR and the
// strobe-to-acknowledge latency (rising edges from the data strobe):
//  - test writes, single (3 edges) and block, land in the FIFO in order;
//  - reads, single (2 edges) and block, return them in order;
//  - read of an empty FIFO, test write with the pipeline on, reads of
//    command offsets, unused offsets and the IEEE 1394 window: bus error;
//  - another board's address: no response;
//  - 0x004 toggles l1b_on, 0x018 / 0x01C give one soft_reset pulse each and
//    clear l1b_on.
module tb_vme_interface;
  localparam logic [31:0] BASE = 32'h1000_0000;
  logic clk = 0, rst = 1;
  logic        vme_as_n, vme_write_n, vme_lword_n, vme_iack_n;
  logic [1:0]  vme_ds_n;
  logic [5:0]  vme_am;
  logic [31:1] vme_addr;
  logic [31:0] vme_d_in, vme_d_out;
  logic        vme_d_oe, vme_dtack_n, vme_berr_n;
  logic [31:0] dr_q = '0, dr_test_data;
  logic        dr_empty, dr_full, dr_ren, dr_test_sel, dr_test_wen;
  logic        l1b_on, soft_reset, led_access;
  logic [31:0] fifo[$];
  int          full_lim = 64;
  int checks = 0, failures = 0, resets = 0, led_seen = 0;

  vme_interface #(.BASE_ADDR(BASE)) dut (.*);

  vme_master u_m (
    .clk(clk), .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n),
    .lword_n(vme_lword_n), .iack_n(vme_iack_n), .am(vme_am), .addr(vme_addr),
    .d_out(vme_d_in), .d_in(vme_d_out), .d_oe(vme_d_oe),
    .dtack_n(vme_dtack_n), .berr_n(vme_berr_n));

  assign dr_empty = (fifo.size() == 0);
  assign dr_full  = (fifo.size() >= full_lim);
  always @(posedge clk) if (!rst) begin
    if (dr_ren && fifo.size() > 0) dr_q <= fifo.pop_front();
    if (dr_test_wen) begin
      if (!dr_test_sel) begin failures++; $display("FAIL: test write without sel"); end
      fifo.push_back(dr_test_data);
    end
    if (!rst && soft_reset) resets++;
    if (!rst && led_access) led_seen++;
  end

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, words[$], got[$];
    bit b, bs[$];
    int lat, lats[$], r0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // single test writes
    for (int i = 0; i < 3; i++) begin
      words.push_back($urandom);
      u_m.single(1, BASE, 6'h09, words[i], rd, b, lat);
      check(!b && lat == 3, $sformatf("test write: berr %0b lat %0d (exp 3)", b, lat));
    end
    // block test write
    got.delete();
    for (int i = 0; i < 4; i++) got.push_back($urandom);
    u_m.block_write(BASE, got, bs, lats);
    foreach (bs[i]) check(!bs[i], "block write beat acknowledged");
    check(lats[0] == 3 && lats[1] == 2, $sformatf("block write latencies %0d %0d", lats[0], lats[1]));
    words = {words, got};
    check(fifo.size() == 7, $sformatf("FIFO holds %0d exp 7", fifo.size()));
    foreach (words[i]) check(fifo[i] == words[i], "written word");
    // single reads
    for (int i = 0; i < 3; i++) begin
      u_m.single(0, BASE, (i == 1) ? 6'h0A : 6'h09, 0, rd, b, lat);
      check(!b && lat == 2 && rd == words[i], $sformatf("read %h exp %h lat %0d", rd, words[i], lat));
    end
    // block read of the remaining 4
    u_m.block_read(BASE, 4, got, bs, lats);
    foreach (got[i]) check(!bs[i] && got[i] == words[3 + i] && lats[i] == 2,
                           $sformatf("block read %h exp %h lat %0d", got[i], words[3 + i], lats[i]));
    // empty
    u_m.single(0, BASE, 6'h09, 0, rd, b, lat);
    check(b, "read of empty FIFO: bus error");
    // bad AM
    fifo.push_back(32'h1234_5678);
    u_m.single(0, BASE, 6'h39, 0, rd, b, lat);
    check(b && fifo.size() == 1, "bad AM: bus error, nothing popped");
    // run/stop toggle
    u_m.single(1, BASE + 4, 6'h09, 0, rd, b, lat);
    check(!b && lat == 2 && l1b_on, "0x004 switches the pipeline on");
    u_m.single(1, BASE, 6'h09, 32'h5555, rd, b, lat);
    check(b && fifo.size() == 1, "test write while on: bus error");
    u_m.single(1, BASE + 4, 6'h09, 0, rd, b, lat);
    check(!b && !l1b_on, "0x004 switches it off");
    // FIFO reset and system reset
    u_m.single(1, BASE + 4, 6'h09, 0, rd, b, lat);
    r0 = resets;
    u_m.single(1, BASE + 32'h18, 6'h09, 0, rd, b, lat);
    check(!b && resets == r0 + 1 && !l1b_on, "0x018: one reset pulse, pipeline off");
    u_m.single(1, BASE + 4, 6'h09, 0, rd, b, lat);
    u_m.single(1, BASE + 32'h1C, 6'h09, 0, rd, b, lat);
    check(!b && resets == r0 + 2 && !l1b_on, "0x01C: one reset pulse, pipeline off");
    // errors
    u_m.single(0, BASE + 4, 6'h09, 0, rd, b, lat);
    check(b, "read of 0x004: bus error");
    u_m.single(1, BASE + 8, 6'h09, 0, rd, b, lat);
    check(b, "write of 0x008: bus error");
    u_m.single(0, BASE + 32'h100, 6'h09, 0, rd, b, lat);
    check(b, "IEEE 1394 window: bus error");
    u_m.single(1, BASE + 32'h1FC, 6'h09, 0, rd, b, lat);
    check(b, "IEEE 1394 window top: bus error");
    r0 = led_seen;
    u_m.single(0, 32'h2000_0000, 6'h09, 0, rd, b, lat);
    check(lat == -1 && led_seen == r0, "other board: no response");
    check(resets == 2, "no other reset pulse");
    check(fifo.size() == 1, "errors popped nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
