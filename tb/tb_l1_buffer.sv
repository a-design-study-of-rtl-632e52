// Self-checking test of l1_buffer at its default size (16 x 256).
// For several switch settings (including the saturating ones) it starts the
// pipeline with the start mark and checks:
//  - wen rises the clock after the start mark, ren exactly LEN clocks later
//    (LEN = 248 + min(dip_len, 8); 254 gives the 6.35 us of the prototype);
//  - from the clock after the first read, dout in clock n equals din of
//    clock n - LEN - 1;
//  - switching off returns to idle, and a restart gives the same latency.
// Inputs change on the falling edge; outputs are sampled there too.
module tb_l1_buffer;
  logic clk = 0, rst = 1, on = 0, start = 0;
  logic [3:0] dip_len = 0;
  logic [15:0] din = 0, dout;
  logic running, wen, ren, full, empty;
  int checks = 0, failures = 0;

  l1_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pipeline(input logic [3:0] sw, input int n_run);
    int len, cyc, wen_cyc, ren_cyc, start_cyc, mism;
    logic [15:0] hist[int];
    len = 248 + ((sw > 8) ? 8 : sw);
    dip_len = sw;
    @(negedge clk); on = 1;
    repeat (3) @(negedge clk);
    check(!wen && !ren && !running, "idle before start mark");
    cyc = 0; wen_cyc = -1; ren_cyc = -1; mism = 0;
    start = 1; start_cyc = 0; din = 16'($urandom); hist[0] = din;
    forever begin
      @(negedge clk); cyc++;
      // outputs of clock cyc (after the rising edge that began it)
      if (wen && wen_cyc < 0) wen_cyc = cyc;
      if (ren && ren_cyc < 0) ren_cyc = cyc;
      if (running && ren_cyc > 0 && cyc > ren_cyc && hist.exists(cyc - len - 1)) begin
        checks++;
        if (dout != hist[cyc - len - 1]) begin
          mism++; failures++;
          if (mism < 5) $display("FAIL: len %0d cyc %0d dout %h exp %h", len, cyc, dout, hist[cyc - len - 1]);
        end
      end
      start = 0;
      din = 16'($urandom); hist[cyc] = din;
      if (ren_cyc > 0 && cyc > ren_cyc + n_run) break;
      if (cyc > 2000) break;
    end
    check(wen_cyc == start_cyc + 1, $sformatf("wen at %0d exp %0d", wen_cyc, start_cyc + 1));
    check(ren_cyc - wen_cyc == len, $sformatf("len %0d: ren-wen = %0d", len, ren_cyc - wen_cyc));
    check(running, "running");
    on = 0;
    @(negedge clk); @(negedge clk);
    check(!running && !wen && !ren, "stops when switched off");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // The start mark is ignored while switched off.
    start = 1; repeat (3) @(negedge clk); start = 0;
    check(!wen, "no write while off");
    run_pipeline(4'd6, 300);   // 254, the setting of the prototype test
    run_pipeline(4'd0, 300);   // 248
    run_pipeline(4'd8, 300);   // 256: full memory
    run_pipeline(4'd15, 100);  // saturates to 256
    run_pipeline(4'd3, 100);   // 251
    run_pipeline(4'd6, 100);   // restart gives the same result
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
