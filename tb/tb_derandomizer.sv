// Self-checking test of the derandomizer with a small depth (16 words) so
// that it fills. Random triggers arrive while the pipeline streams or not;
// the testbench models the TTC latch. Checks:
//  - trig_wen is high exactly in the clock after a trigger that is taken;
//  - only triggers seen while streaming are stored, as {l1b_data of the
//    clock after the trigger, TTC word of the trigger clock};
//  - triggers that find the FIFO full (a write in flight counted) are
//    dropped, and the FIFO never overflows;
//  - the test path stores test_data words;
//  - reads return the stored words in order.
module tb_derandomizer;
  import tgc_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst = 1, l1b_running = 0, trigger = 0;
  logic [15:0] l1b_data = '0;
  ttc_word_t ttc_latched, ttc_hold = '0, ttc_now = '0;
  logic ttc_le, ttc_oe, trig_wen;
  logic test_sel = 0, test_wen = 0;
  logic [31:0] test_data = '0;
  logic ren = 0;
  dr_word_t q;
  logic full, empty;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, stored = 0, dropped = 0;
  logic [31:0] model[$];
  bit pend;            // a trigger taken in the previous clock
  ttc_word_t pend_ttc;

  derandomizer #(.DEPTH(D)) dut (.*);

  assign ttc_latched = ttc_oe ? ttc_hold : '0;
  always_ff @(posedge clk) if (ttc_le) ttc_hold <= ttc_now;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pop everything and compare.
  task automatic drain();
    while (model.size() > 0) begin
      @(negedge clk) ren = 1;
      @(negedge clk) ren = 0;
      check(q == model[0], $sformatf("read %h exp %h", q, model[0]));
      void'(model.pop_front());
    end
    check(empty, "empty after drain");
  endtask

  initial begin
    bit take;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    pend = 0;
    for (int i = 0; i < 3000; i++) begin
      // drive clock i
      l1b_running = (i % 500) > 20;
      trigger = ($urandom % 3) == 0;
      ttc_now = ttc_word_t'({2'b00, 1'b0, trigger, 12'(i)});
      l1b_data = 16'($urandom);
      if (($urandom % 7) == 0 && model.size() > 0) ren = 1; else ren = 0;
      #1;
      // a write from the previous clock's trigger happens now
      check(trig_wen == pend, "trig_wen one clock after a taken trigger");
      if (pend) begin
        model.push_back({l1b_data, 16'(pend_ttc)});
        stored++;
      end
      // room rule: words held plus the write in flight (already in the
      // model) must stay below the depth; a read in this clock does not count
      take = trigger && l1b_running && (model.size() < D);
      check(ttc_le == take, "ttc_le decision");
      if (trigger && l1b_running && !take) dropped++;
      if (ren && model.size() > 0) begin
        @(posedge clk); #1;
        check(q == model[0], $sformatf("read %h exp %h", q, model[0]));
        void'(model.pop_front());
      end else begin
        @(posedge clk); #1;
      end
      check(count == model.size(), $sformatf("count %0d model %0d", count, model.size()));
      pend = take; pend_ttc = ttc_now;
      @(negedge clk);
    end
    trigger = 0; ren = 0;
    @(negedge clk);
    if (pend) begin model.push_back({l1b_data, 16'(pend_ttc)}); pend = 0; end
    @(negedge clk);
    check(stored > 100, "triggers stored");
    check(dropped > 10, "triggers dropped when full");
    drain();
    // test path
    l1b_running = 0;
    for (int i = 0; i < 5; i++) begin
      test_sel = 1; test_data = $urandom; test_wen = 1;
      model.push_back(test_data);
      @(negedge clk);
      test_wen = 0; test_sel = 0;
    end
    drain();
    $display("stored %0d dropped %0d", stored, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
