// Self-checking test of ttc_interface: random TTC words with random latch
// and output enables. Checks the decoded strobe, start mark and bunch ID
// against the chosen bit layout, that the latch holds the word of the last
// clock with le high, and that the output is zero while oe is low.
module tb_ttc_interface;
  import tgc_pkg::*;
  logic clk = 0, rst = 1, le = 0, oe = 0;
  ttc_word_t ttc_in = '0, latched;
  logic bcstrobe, start;
  logic [11:0] bcid;
  logic [15:0] model = '0;
  int checks = 0, failures = 0;

  ttc_interface dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    logic [15:0] w;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 2000; i++) begin
      w = 16'($urandom);
      ttc_in = ttc_word_t'(w);
      le = ($urandom % 4) == 0;
      oe = ($urandom % 2) == 0;
      #1;
      check(bcid == w[11:0], "bcid field");
      check(bcstrobe == w[12], "trigger strobe bit 12");
      check(start == w[13], "start mark bit 13");
      check(latched == (oe ? model : 16'h0), $sformatf("latched %h exp %h oe %b", latched, model, oe));
      @(posedge clk);
      if (le) model = w;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
