// tb_ppm15_divider: checks the 91:1 divider of the 4 second clock. A phi1
// strobe is given every 8 clocks, with the 102 kHz pulse input every clock.
// Checked: the first phi1 after reset and after `clr` gives a pulse, pulses
// come every 91 phi1 strobes (15 per 1365-bit scan), and the output level is
// exactly one input pulse period wide.
module tb_ppm15_divider;
  logic clk = 0, rst_n = 0, clr = 0, tick = 1, ph1_stb = 0;
  logic pulse15_stb, pulse15;
  int checks = 0, failures = 0;
  int nph1 = 0, last = -1, npulse = 0, lvl = 0;

  always #5 clk = ~clk;
  ppm15_divider dut (.*);

  int ph = 0;
  always @(posedge clk) begin
    ph <= (ph + 1) % 8;
    ph1_stb <= rst_n && !clr && (ph == 7);
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (pulse15) lvl++;
    if (ph1_stb) begin
      if (pulse15_stb) begin
        if (last >= 0) check("91 phi1 between pulses", nph1 - last, 91);
        if (npulse > 0) check("level width", lvl, 1);
        lvl = 0;
        last = nph1; npulse++;
      end
      nph1++;
    end else if (pulse15_stb) begin failures++; $display("FAIL pulse without phi1"); end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (nph1 == 1); #1;
    check("first phi1 gives pulse", npulse, 1);
    wait (nph1 == 1366); #1;
    check("15 pulses in 1365 bits", npulse, 16);
    @(negedge clk); clr = 1; repeat (20) @(negedge clk); clr = 0;
    begin int n0, p0; n0 = nph1; p0 = npulse; last = -1;
      wait (nph1 == n0 + 1); #1;
      check("pulse at first phi1 after clr", npulse, p0 + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
