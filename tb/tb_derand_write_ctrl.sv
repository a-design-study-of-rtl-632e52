// Self-checking test of derand_write_ctrl, driving the already-synchronized
// strobes directly. Checks:
//  - single write: sel from the clock after start, one wen when ds is seen
//    (two clocks after start when ds comes with the cycle), dtack from the
//    following clock until ds is released;
//  - block write (AM 0Bh): one wen per data strobe;
//  - refusals with bus error and no write: bad AM, FIFO full, Level 1
//    buffer switched on; a block write that fills the FIFO errs on the
//    next strobe.
module tb_derand_write_ctrl;
  logic clk = 0, rst = 1, start = 0, as = 0, ds = 0, full = 0, l1b_on = 0;
  logic [5:0] am = 6'h09;
  logic sel, wen, dtack, berr, busy;
  int checks = 0, failures = 0, writes = 0;

  derand_write_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (wen) begin
    writes++;
    if (!sel) begin failures++; $display("FAIL: write without sel"); end
  end

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

  // Start a cycle with ds present; return edges until dtack/berr.
  task automatic cycle_ds(input logic [5:0] m, output int lat, output bit b);
    am = m; as = 1; ds = 1; start = 1;
    @(posedge clk); #1 start = 0; lat = 1;
    while (!dtack && !berr && lat < 20) begin @(posedge clk); #1; lat++; end
    b = berr;
  endtask

  task automatic end_beat();
    repeat (2) @(posedge clk);
    #1 ds = 0;
    @(posedge clk); #1;
    check(!dtack && !berr, "ack released with ds");
  endtask

  initial begin
    int lat, w0; bit b;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // single write, AM 09h and 0Ah
    for (int k = 0; k < 2; k++) begin
      w0 = writes;
      cycle_ds(k ? 6'h0A : 6'h09, lat, b);
      check(!b && lat == 2, $sformatf("single write: dtack %0d clocks after start (exp 2)", lat));
      check(writes == w0 + 1, "one write");
      end_beat(); as = 0; @(posedge clk); #1;
      check(!busy && !sel, "idle after write");
    end
    // block write of 4 words
    w0 = writes;
    cycle_ds(6'h0B, lat, b);
    check(!b, "block beat 1");
    end_beat();
    for (int i = 1; i < 4; i++) begin
      ds = 1; lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!dtack && !berr && lat < 20);
      check(!berr && lat == 1, $sformatf("block beat %0d: %0d clocks (exp 1)", i + 1, lat));
      end_beat();
    end
    as = 0; repeat (2) @(posedge clk); #1;
    check(writes == w0 + 4, $sformatf("block: %0d writes exp 4", writes - w0));
    // refusals
    w0 = writes;
    cycle_ds(6'h3D, lat, b); check(b, "bad AM: bus error"); end_beat(); as = 0; @(posedge clk);
    full = 1;
    cycle_ds(6'h09, lat, b); check(b, "full: bus error"); end_beat(); as = 0; @(posedge clk);
    full = 0; l1b_on = 1;
    cycle_ds(6'h09, lat, b); check(b, "Level 1 buffer on: bus error"); end_beat(); as = 0; @(posedge clk);
    l1b_on = 0;
    #1 check(writes == w0, "no write on refusals");
    // block write that fills the FIFO after the first word
    cycle_ds(6'h0B, lat, b); check(!b, "block fill beat 1"); end_beat();
    full = 1;
    ds = 1; lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!dtack && !berr && lat < 20);
    check(berr, "block write into full FIFO: bus error");
    end_beat(); as = 0; full = 0; @(posedge clk); #1;
    check(writes == w0 + 1 && !busy, "one write before the error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
