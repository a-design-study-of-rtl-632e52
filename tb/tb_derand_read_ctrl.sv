// Self-checking test of derand_read_ctrl, driving the already-synchronized
// strobes directly. Checks, cycle by cycle:
//  - single read (AM 09h and 0Ah): one pop when the strobe is seen, dtack
//    and oe on the next clock until ds is released, then idle;
//  - start before ds: the pop waits for ds;
//  - block read (AM 0Bh): one pop per data strobe, none when the block ends;
//  - bad AM code and empty FIFO: bus error while ds is held, no pop;
//  - block read that runs into an empty FIFO: bus error on that strobe.
module tb_derand_read_ctrl;
  logic clk = 0, rst = 1, start = 0, as = 0, ds = 0, empty = 0;
  logic [5:0] am = 6'h09;
  logic ren, oe, dtack, berr, busy;
  int checks = 0, failures = 0, pops = 0;

  derand_read_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (ren) pops++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One beat with ds: returns edges from ds to dtack/berr.
  task automatic beat(output int lat, output bit got_berr);
    lat = 0;
    ds = 1;
    do begin @(posedge clk); #1; lat++; end while (!dtack && !berr && lat < 20);
    got_berr = berr;
    if (dtack) check(oe, "oe with dtack");
    repeat (2) @(posedge clk);
    #1 check(dtack == !got_berr && berr == got_berr, "ack held while ds");
    ds = 0;
    @(posedge clk); #1;
    check(!dtack && !berr, "ack released with ds");
  endtask

  task automatic begin_cycle(input logic [5:0] m, input bit with_ds);
    am = m; as = 1; ds = with_ds; start = 1;
    @(posedge clk); #1 start = 0;
  endtask

  initial begin
    int lat, p0; bit b;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // single reads, start and ds together
    for (int k = 0; k < 2; k++) begin
      p0 = pops;
      am = k ? 6'h0A : 6'h09; as = 1; ds = 1; start = 1;
      #1;
      check(ren, "pop in the start clock when ds is present");
      @(posedge clk); #1 start = 0;
      check(dtack && oe && !berr, "dtack one clock after the pop");
      repeat (3) @(posedge clk);
      #1 ds = 0; as = 0;
      @(posedge clk); #1;
      check(!dtack && !busy, "idle after single read");
      check(pops == p0 + 1, "exactly one pop");
    end
    // start before ds
    p0 = pops;
    begin_cycle(6'h09, 0);
    repeat (3) @(posedge clk);
    #1 check(pops == p0 && !dtack, "no pop before ds");
    beat(lat, b);
    check(lat == 1 && !b, $sformatf("ds->dtack %0d edges after ds (exp 1 here, strobe already sampled)", lat));
    as = 0; @(posedge clk); #1;
    check(pops == p0 + 1 && !busy, "single read with late ds");
    // block read of 5 words
    p0 = pops;
    begin_cycle(6'h0B, 0);
    for (int i = 0; i < 5; i++) begin
      beat(lat, b);
      check(!b && lat == 1, "block beat");
      @(posedge clk); #1;
    end
    as = 0; repeat (3) @(posedge clk); #1;
    check(pops == p0 + 5, $sformatf("block: %0d pops exp 5", pops - p0));
    check(!busy, "idle after block");
    // bad AM
    p0 = pops;
    begin_cycle(6'h39, 0);
    beat(lat, b);
    check(b, "bad AM gives bus error");
    as = 0; @(posedge clk); #1;
    check(pops == p0, "no pop on bad AM");
    // empty FIFO
    empty = 1;
    begin_cycle(6'h09, 0);
    beat(lat, b);
    check(b, "empty FIFO gives bus error");
    as = 0; @(posedge clk); #1;
    check(pops == p0, "no pop on empty");
    // block read that hits empty on the third strobe
    empty = 0;
    begin_cycle(6'h0B, 0);
    beat(lat, b); check(!b, "block beat 1");
    beat(lat, b); check(!b, "block beat 2");
    empty = 1;
    beat(lat, b); check(b, "block beat 3 runs into empty: bus error");
    as = 0; empty = 0; @(posedge clk); #1;
    check(pops == p0 + 2 && !busy, "two pops before the error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
