// tb_marker_burst: checks the minute marker burst with the real divider
// ratios. One clock is one 102 kHz pulse; a bit lasts 4485 pulses and the
// 39:1 strobe comes one pulse after each 39-pulse boundary, as in the bit
// clock divider (3082 mod 39 = 1). The scan is run from word 65 bit 10 to
// word 1 bit 4. Expected values are worked out from the ratios: the gate
// opens at the read of word 65 bit 14 and closes at word 1 bit 2; the wave
// toggles every 7 x 39 = 273 pulses (186.88 Hz at 102.04 kHz); 920 strobes
// fall between the gate opening and word 1 bit 1, giving 131 toggles
// (65.5 cycles); one divider pulse is deleted (one toggle interval of 546
// pulses, the phase reversal); 15 toggles follow before the gate closes.
module tb_marker_burst;
  import geos_pkg::*;
  logic clk = 0, rst_n = 0, rd_stb = 0, m39_stb = 0;
  addr_t addr;
  logic marker_gate, marker_wave, reversal;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  marker_burst dut (.*);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  int t = 0;                 // pulse count since start
  int word = 65, bitn = 10;
  int gate_on_t = -1, gate_off_t = -1, rev_t = -1, n_rev = 0;
  int tog_before = 0, tog_after = 0, last_tog = -1, long_gaps = 0, bad_gaps = 0;
  logic wave_d = 0, gate_d = 0;

  always_comb addr = addr_of(word, bitn);

  always @(posedge clk) if (rst_n) begin
    // Observe outputs of the previous edge.
    if (gate_d && marker_gate && (marker_wave != wave_d)) begin
      if (rev_t < 0) tog_before++; else tog_after++;
      if (last_tog >= 0) begin
        if (t - last_tog == 546) long_gaps++;
        else if (t - last_tog != 273) bad_gaps++;
      end
      last_tog = t;
    end
    if (marker_gate && !gate_d) gate_on_t = t;
    if (!marker_gate && gate_d) gate_off_t = t;
    if (reversal) begin rev_t = t; n_rev++; end
    wave_d <= marker_wave; gate_d <= marker_gate;
    // Drive the next pulse.
    t++;
    if (t % 4485 == 0) begin
      if (bitn == 21) begin bitn = 1; word = (word == 65) ? 1 : word + 1; end
      else bitn++;
    end
    rd_stb  <= (t % 4485 == 0);
    m39_stb <= (t % 39 == 1);
  end

  initial begin
    repeat (20 * 4485) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    wait (word == 1 && bitn == 4);
    repeat (5) @(posedge clk);
    check("gate opens at W65B14", gate_on_t, 4 * 4485 + 1);
    check("gate closes at W1B2", gate_off_t, 13 * 4485 + 1);
    check("one phase reversal", n_rev, 1);
    check("toggles before reversal", tog_before, 131);
    check("toggles after reversal", tog_after, 15);
    check("one doubled interval", long_gaps, 1);
    check("all other intervals 273 pulses", bad_gaps, 0);
    check("wave low after gate", marker_wave, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
