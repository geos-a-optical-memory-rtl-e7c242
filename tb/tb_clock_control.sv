// tb_clock_control: checks the clock control and delete circuit. Input
// pulses come every 4 clocks. Directed cases: pulses pass untouched; one
// delete command removes exactly the next pulse; an inhibited command
// removes nothing; `stop` blocks all pulses and a command armed before a
// stop removes the first pulse after it; and over a long run the output
// count equals input pulses minus accepted commands.
module tb_clock_control;
  logic clk = 0, rst_n = 0;
  logic tick_in = 0, stop = 0, delete_cmd = 0, inhibit = 0;
  logic tick_out, deleted;
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_del = 0;

  always #5 clk = ~clk;

  clock_control dut (.*);

  // Input pulse every 4 clocks.
  int ph = 0;
  always @(posedge clk) begin
    ph <= (ph + 1) % 4;
    tick_in <= (ph == 3);
  end
  always @(posedge clk) if (rst_n) begin
    n_in  += tick_in & ~stop;
    n_out += tick_out;
    n_del += deleted;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic cmd(input logic inh);
    @(negedge clk); delete_cmd = 1; inhibit = inh;
    @(negedge clk); delete_cmd = 0; inhibit = 0;
  endtask

  task automatic window(input int clocks, output int in_c, output int out_c);
    int i0 = n_in, o0 = n_out;
    repeat (clocks) @(posedge clk);
    #1; in_c = n_in - i0; out_c = n_out - o0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    repeat (3) @(posedge clk); rst_n = 1;
    window(40, a, b);
    check("no delete passes all", b, a);
    check("ten pulses seen", a, 10);
    cmd(0);
    window(40, a, b);
    check("one delete", a - b, 1);
    cmd(1);
    window(40, a, b);
    check("inhibited delete", a - b, 0);
    // Stop blocks everything.
    @(negedge clk); stop = 1;
    begin int o0; o0 = n_out; repeat (40) @(posedge clk); #1 check("stop blocks", n_out - o0, 0); end
    cmd(0);
    @(negedge clk); stop = 0;
    window(40, a, b);
    check("delete held over stop", a - b, 1);
    // Long run with spaced commands.
    begin
      int i0, o0, d0, k;
      i0 = n_in; o0 = n_out; d0 = n_del; k = 0;
      for (int r = 0; r < 50; r++) begin
        repeat ($urandom_range(10, 30)) @(posedge clk);
        if ($urandom_range(0, 1) == 1) begin cmd(0); k++; end
      end
      repeat (20) @(posedge clk); #1;
      check("long run deletions", (n_in - i0) - (n_out - o0), k);
      check("deleted strobe count", n_del - d0, k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
