// tb_cs_address: checks the coincidence-switch scan. It steps the address
// through a full scan and compares the X and Y lines of bit 1 and bit 21 of
// a set of words with the memory address allocation table (lines counted
// from 1 there), checks that all 1365 crossings are visited once, that the
// scan returns to word 1 bit 1 after 1365 steps, that `w1b1` marks that
// position only, and that `clr` returns to word 1 bit 1.
module tb_cs_address;
  import geos_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, adv = 0;
  addr_t addr;
  logic w1b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  cs_address dut (.*);

  // Allocation table entries: word, X of bit 1, X of bit 21 (Y is 1 and 21).
  localparam int NT = 12;
  localparam int TAB [NT][3] = '{
    '{1, 1, 21}, '{2, 22, 42}, '{4, 64, 19}, '{10, 60, 15}, '{17, 12, 32},
    '{31, 46, 1}, '{34, 44, 64}, '{35, 65, 20}, '{45, 15, 35}, '{60, 5, 25},
    '{61, 26, 46}, '{65, 45, 65}};

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit visited [65][21];
    int dup = 0, nw1 = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check("reset at X1", addr.x, 0);
    check("reset at Y1", addr.y, 0);
    for (int k = 0; k < 1365; k++) begin
      int w, b;
      w = k / 21 + 1; b = k % 21 + 1;
      if (visited[addr.x][addr.y]) dup++;
      visited[addr.x][addr.y] = 1;
      if (w1b1) nw1++;
      check("Y line is bit number", addr.y + 1, b);
      for (int i = 0; i < NT; i++) begin
        if (TAB[i][0] == w && b == 1)  check($sformatf("X of W%0dB1", w),  addr.x + 1, TAB[i][1]);
        if (TAB[i][0] == w && b == 21) check($sformatf("X of W%0dB21", w), addr.x + 1, TAB[i][2]);
      end
      adv = 1; @(negedge clk); adv = 0;
      if ($urandom_range(0, 1)) @(negedge clk);   // idle clocks hold the address
    end
    check("no crossing visited twice", dup, 0);
    check("w1b1 once per scan", nw1, 1);
    check("back at W1B1", int'(w1b1), 1);
    adv = 1; repeat (37) @(negedge clk); adv = 0;
    check("moved away", int'(w1b1), 0);
    clr = 1; @(negedge clk); clr = 0;
    check("clr to W1B1", int'(w1b1), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
