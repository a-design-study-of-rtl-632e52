// Self-checking test of sync_fifo at the Level 1 buffer size (16 x 256).
// Random pushes and pops, including runs that fill it and drain it, are
// compared with a queue model: read data (one clock after the pop), full,
// empty and count. Also checks a write refused when full, a write accepted
// when full with a simultaneous read, flush, and a pop refused when empty.
module tb_sync_fifo;
  localparam int W = 16, D = 256;
  logic clk = 0, rst = 1, flush = 0, wen = 0, ren = 0;
  logic [W-1:0] din = '0, dout;
  logic full, empty;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  logic [W-1:0] exp_dout;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // One clock: apply wen/ren/din, update the model, check after the edge.
  task automatic step(input bit w, input bit r, input logic [W-1:0] d);
    bit do_r, do_w;
    wen = w; ren = r; din = d;
    do_r = r && model.size() > 0;
    do_w = w && (model.size() < D || do_r);
    @(posedge clk); #1;
    if (do_r) exp_dout = model.pop_front();
    if (do_w) model.push_back(d);
    check(dout == exp_dout, $sformatf("dout %h exp %h", dout, exp_dout));
    check(count == model.size(), $sformatf("count %0d exp %0d", count, model.size()));
    check(full == (model.size() == D), "full flag");
    check(empty == (model.size() == 0), "empty flag");
    wen = 0; ren = 0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_dout = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // pop from empty: ignored
    step(0, 1, '0);
    // fill completely, then one more write without read is refused
    for (int i = 0; i < D; i++) step(1, 0, W'($urandom));
    check(full, "full after DEPTH writes");
    step(1, 0, 16'hBAD0);
    // write while full together with a read: accepted
    step(1, 1, 16'h1234);
    check(full, "still full after simultaneous read/write");
    // drain completely
    for (int i = 0; i < D + 2; i++) step(0, 1, '0);
    check(empty, "empty after drain");
    // random traffic
    for (int i = 0; i < 20000; i++) begin
      int p = (i / 2000) % 2 ? 70 : 30;  // alternate fill-biased and drain-biased phases
      step(($urandom % 100) < (100 - p), ($urandom % 100) < p, W'($urandom));
    end
    // flush empties it
    for (int i = 0; i < 10; i++) step(1, 0, W'(i));
    flush = 1; @(posedge clk); #1 flush = 0;
    model.delete();
    exp_dout = '0;
    check(empty && count == 0, "flush");
    step(1, 0, 16'hCAFE);
    step(0, 1, '0);
    check(dout == 16'hCAFE, "write/read after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
