// tb_epoch_reset: checks the clock reset circuit. 4 second strobes come
// every 40 clocks. Checked: a held tone outside preload 1 does nothing; in
// preload 1 the hold starts only at a 4 second strobe (not before), stays
// while the tone is held and ends when it is released (after the two-flop
// synchronizer); the normalizer inhibit covers preload 1, preload 2 and the
// load scan of that injection, ends in post-load, and is absent in an
// injection without a clock reset.
module tb_epoch_reset;
  import geos_pkg::*;
  logic clk = 0, rst_n = 0, tone = 0, pulse15_stb = 0;
  mode_t mode = MODE_NORMAL;
  logic hold, norm_inhibit;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  epoch_reset dut (.*);

  int ph = 0;
  always @(posedge clk) begin ph <= (ph + 1) % 40; pulse15_stb <= (ph == 39); end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk); rst_n = 1;
    tone = 1; repeat (100) @(negedge clk);
    check("tone in normal mode ignored", hold, 0);
    tone = 0; repeat (5) @(negedge clk);
    mode = MODE_PRELOAD1;
    @(negedge clk iff pulse15_stb);          // just after a strobe
    tone = 1; repeat (10) @(negedge clk);
    check("no hold before strobe", hold, 0);
    wait (pulse15_stb); repeat (2) @(negedge clk);
    check("hold at strobe", hold, 1);
    check("inhibit in preload 1", norm_inhibit, 1);
    repeat (200) @(negedge clk);
    check("hold kept while tone held", hold, 1);
    tone = 0; repeat (2) @(negedge clk);
    check("hold until synchronizer passes", hold, 1);
    repeat (2) @(negedge clk);
    check("hold released", hold, 0);
    mode = MODE_PRELOAD2; @(negedge clk);
    check("inhibit in preload 2", norm_inhibit, 1);
    mode = MODE_LOAD; @(negedge clk);
    check("inhibit in load", norm_inhibit, 1);
    mode = MODE_POSTLOAD; @(negedge clk);
    check("no inhibit in post-load", norm_inhibit, 0);
    mode = MODE_NORMAL; repeat (2) @(negedge clk);
    mode = MODE_PRELOAD1; repeat (100) @(negedge clk);
    mode = MODE_LOAD; @(negedge clk);
    check("no inhibit without clock reset", norm_inhibit, 0);
    check("no hold without tone", hold, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
