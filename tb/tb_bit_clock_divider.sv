// tb_bit_clock_divider: checks the 4485:1 bit clock divider at its default
// sizes. Input pulses come every second clock. Checked: phi1 every 4485
// pulses (43.956 ms of 9.8 us pulses), phi2 3082 pulses after phi1
// (30.207 ms), the restore strobe 20 pulses after phi1, the 39:1 strobe
// every 39 pulses and present at every phi2, the phi1 level lasting one pulse
// period, and the restart on phi1 at the first pulse after `clr`.
module tb_bit_clock_divider;
  logic clk = 0, rst_n = 0, clr = 0, tick = 0;
  logic ph1_stb, ph2_stb, restore_stb, m39_stb, ph1, ph2;
  int checks = 0, failures = 0;
  int tcount = 0;           // input pulses seen
  int last_ph1 = -1, last_m39 = -1, n_ph1 = 0, n_ph2 = 0, n_rst = 0, ph1_len = 0;

  always #5 clk = ~clk;
  bit_clock_divider dut (.*);

  always @(posedge clk) tick <= ~tick & rst_n;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  always @(posedge clk) if (rst_n && !clr) begin
    if (ph1) ph1_len++;
    if (tick) begin
      if (ph1_stb) begin
        if (last_ph1 >= 0) check("phi1 period", tcount - last_ph1, 4485);
        if (n_ph1 > 0) check("phi1 level width (clocks)", ph1_len, 2);
        ph1_len = 0;
        last_ph1 = tcount; n_ph1++;
      end
      if (ph2_stb && last_ph1 >= 0) begin
        check("phi2 after phi1", tcount - last_ph1, 3082); n_ph2++;
        check("m39 at phi2", m39_stb, 1);
      end
      if (restore_stb && last_ph1 >= 0) begin
        check("restore after phi1", tcount - last_ph1, 20); n_rst++;
      end
      if (m39_stb) begin
        if (last_m39 >= 0 && (tcount - last_m39) != 39) begin
          failures++; $display("FAIL m39 period %0d", tcount - last_m39);
        end
        last_m39 = tcount;
      end
      tcount++;
    end else begin
      if (ph1_stb | ph2_stb | restore_stb | m39_stb) begin
        failures++; $display("FAIL strobe without input pulse");
      end
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // First pulse after reset must be phi1.
    @(posedge clk iff tick); #1;
    checks++; if (last_ph1 != 0) begin failures++; $display("FAIL first pulse not phi1"); end
    wait (n_ph1 == 4);
    check("phi2 count", n_ph2, 3);
    check("restore count", n_rst, 3);
    repeat (1000) @(posedge clk);
    @(negedge clk); clr = 1;
    repeat (10) @(negedge clk);
    clr = 0;
    last_ph1 = -1;
    @(posedge clk iff tick); #1;
    check("restart on phi1", last_ph1, tcount - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
