// tb_geos_omcu_full: one complete one-minute scan of the unit with every
// parameter at its default (49:1 prescaler, 4485 prescaler pulses per bit,
// 1365 bits: about 300 million clocks).
//
// The core plane starts with whatever contents the simulator gives it, so
// the testbench learns them as they are read: at each restore strobe it
// takes the bit just read and the bit being written back, and runs its own
// model of the per-bit processing. Words 1-59: bits 1-12 plus one, with the
// carry cleared at bit 1; bits 13-21 unchanged, a one in bits 18-21 being a
// delete command. Word 60: bit 1 plus one, odd bits a ripple counter, even
// bits unchanged, a carry meeting a one even bit being a delete command.
// Word 61 (no flashes sensed) and words 62-65 unchanged. Every written bit
// must match the model, and the scan, from one minute mark to the next, must
// last (1365 x 4485 + deletes) x 49 clocks with each delete command
// swallowing one prescaler pulse. The scan must also carry 15 pulses of the
// 4 second clock, one marker burst, no telemetry (normal mode), and one
// flash sequence start if some word's start time ran out.
module tb_geos_omcu_full;
  import geos_pkg::*;
  localparam longint BASE = 64'd1365 * 4485 * 49;

  logic clk = 0, rst_n = 0, load_cmd = 0, uplink_tone = 0, uplink_data = 0, flash_sense = 0;
  logic [3:0] tube_sel, mode;
  logic seq_gate, clk15, marker_gate, marker_wave, tm_enable, tm_pos, tm_neg;
  logic bit_clk1, bit_clk2, minute_mark, clock_held;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  geos_omcu dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // Bookkeeping runs on edges of the unit's signals, not on every clock,
  // and waits 1 ns after each edge so that outputs of that clock are settled.
  bit in_scan = 0;
  int n_mm = 0, n15 = 0, nmark = 0, ntm = 0, ndel_cmd = 0, ndeleted = 0, nstart = 0;
  longint last_mm = -1, period = 0;

  always @(posedge bit_clk1) begin
    #1;
    if (minute_mark) begin
      if (last_mm >= 0) period = ($time - last_mm) / 10;
      last_mm = $time; n_mm++;
    end
  end
  always @(posedge clk15)       n15++;
  always @(posedge marker_gate) nmark++;
  always @(posedge tm_pos or posedge tm_neg) ntm++;
  always @(posedge dut.delete_cmd) if (in_scan) ndel_cmd++;
  always @(posedge dut.deleted)    if (in_scan) ndeleted++;
  always @(posedge dut.seq_start)  if (in_scan) nstart++;

  // Reference model of the per-bit processing, run at each restore.
  int nbits = 0, bad = 0, mdel = 0, mfire = 0;
  bit mcarry = 0;
  always @(posedge dut.restore_stb) begin
    int w, b;
    bit rd, exp;
    int s;
    #1;
    if (in_scan) begin
      w = nbits / 21 + 1; b = nbits % 21 + 1;
      rd = dut.rd_data; exp = rd;
      if (w <= 59 || (w == 60 && b == 1)) begin
        if (b == 1) mcarry = 0;
        if (b <= 12) begin
          s = int'(rd) + int'(b == 1) + int'(mcarry);
          exp = s[0]; mcarry = s[1];
          if (b == 12 && mcarry && w <= 59) mfire++;
        end
        if (w <= 59 && b >= 18 && rd) mdel++;
      end else if (w == 60) begin
        if (b % 2 == 1) begin
          s = int'(rd) + int'(mcarry);
          exp = s[0]; mcarry = s[1];
        end else if (mcarry && rd) mdel++;
      end
      if (dut.wr_data != exp) begin
        bad++;
        if (bad <= 5) $display("FAIL word %0d bit %0d: wrote %0d expected %0d", w, b, dut.wr_data, exp);
      end
      nbits++;
    end
  end

  initial begin
    #(64'd10 * BASE * 2);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n15_0, nmark_0;
    repeat (5) @(posedge clk); rst_n = 1;
    wait (n_mm == 1);
    in_scan = 1;
    n15_0 = n15; nmark_0 = nmark;
    wait (n_mm == 2);
    in_scan = 0;
    check("normal mode", mode, MODE_NORMAL);
    check("bits restored in one scan", nbits, N_CELLS);
    check("restored bits matching the model", bad, 0);
    check("delete commands", ndel_cmd, mdel);
    check("prescaler pulses swallowed", ndeleted, mdel);
    check("scan period", period, BASE + 49 * mdel);
    check("15 pulses of the 4 s clock per scan", n15 - n15_0, 15);
    check("one marker burst per scan", nmark - nmark_0, 1);
    check("no telemetry in normal mode", ntm, 0);
    check("flash sequence starts", nstart, (mfire > 0) ? 1 : 0);
    $display("scan of %0d clocks, %0d delete commands, %0d words due", period, mdel, mfire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
