// tb_geos_omcu: end-to-end test of the whole unit through two injection
// sequences. The prescaler is set to 2 (instead of 49) so that a one-minute
// scan takes 12.2 million clocks; all other sizes are the defaults.
//
// The testbench plays the ground station and the optical sequence
// controller:
//  * injection 1 with an epoch reset: load command, data one tone held
//    through a 4 second pulse (clock stops and restarts on word 1 bit 1 with
//    a 4 second pulse), a full preload 2 scan with the normalizer inhibited
//    (period exactly 1365 x 4485 prescaler periods), a load scan driving a
//    memory image on the uplink, and the post-load readout, which must equal
//    the image;
//  * normal scans: every scan period must be (1365 x 4485 + Nc + Nv_k)
//    prescaler periods, Nc being the normalizer ones of the image and Nv_k
//    the vernier deletions of scan k (carries of a counter at k against the
//    reference bits); flash sequences from words 40 (five flashes), 35
//    (seven) and 1 (five, then flash disable) must appear with the right
//    tubes, starting on the minute mark and 91 bit times apart; word 50 must
//    be blocked by the flash disable;
//  * the controller arms on the first 4 second pulse in the sequence gate
//    and flashes on the following ones, returning a sensor pulse each time;
//  * injection 2 without a tone: the preload 2 readout must show every
//    flash time field advanced by the number of scans, the vernier counter
//    at that number and the flash count word equal to the flashes sensed.
// Each mechanism (clock hold, normalizer inhibit, load, deletions, vernier
// deletions, five and seven flash sequences, blocked start, marker phase
// reversal) is counted and must have happened.
module tb_geos_omcu;
  import geos_pkg::*;
  localparam int PS = 2;
  localparam longint BASE = 64'd1365 * 4485 * PS;

  logic clk = 0, rst_n = 0, load_cmd = 0, uplink_tone = 0, uplink_data = 0, flash_sense = 0;
  logic [3:0] tube_sel, mode;
  logic seq_gate, clk15, marker_gate, marker_wave, tm_enable, tm_pos, tm_neg;
  logic bit_clk1, bit_clk2, minute_mark, clock_held;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  geos_omcu #(.PRESCALE(PS)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // ---------------- memory image ----------------
  bit img [66][22];
  int tval [60];
  int nc;
  localparam logic [9:0] VREF = 10'b1011011011;   // bit j = reference bit 2j+2 (1101101101 from bit 2)

  function automatic int nv(input int k);      // vernier deletions in scan k
    int n = 0;
    for (int j = 0; j < 10; j++) if (k % (1 << (j + 1)) == 0 && VREF[j]) n++;
    return n;
  endfunction

  // ---------------- bit tracking, uplink and readout ----------------
  int bitidx = 0;
  logic bc1_d = 0, mm_d = 0, tm_d = 0, c15_d = 0, gate_d = 0;
  bit rdout [1365];
  bit rdprev [1365];     // readout of the scan that ended at the last minute mark
  longint cyc = 0, last_mm = -1, period = 0;
  int n_mm = 0;
  always @(posedge clk) begin
    cyc++;
    if (minute_mark && !mm_d) begin
      if (last_mm >= 0) period = cyc - last_mm;
      last_mm = cyc; n_mm++;
      rdprev = rdout;
    end
    if (bit_clk1 && !bc1_d) begin
      bitidx = (minute_mark) ? 0 : bitidx + 1;
      uplink_data <= img[bitidx / 21 + 1][bitidx % 21 + 1];
    end
    if ((tm_pos || tm_neg) && !tm_d && bitidx < 1365) rdout[bitidx] = tm_pos;
    bc1_d <= bit_clk1; mm_d <= minute_mark; tm_d <= tm_pos | tm_neg;
  end

  // ---------------- optical sequence controller model ----------------
  int armed = 0, nflash_seq = 0, total_flash = 0, n_five = 0, n_seven = 0, first_on_mark = 0;
  int last_flash_bit = -1, bad_spacing = 0;
  logic [3:0] seq_tubes [$];
  int seq_len [$];
  always @(posedge clk) begin
    if (clk15 && !c15_d) begin
      if (gate_d) begin
        if (!armed) armed = 1;
        else begin
          if (nflash_seq == 0) begin
            if (minute_mark) first_on_mark++;
          end else if (bitidx - last_flash_bit != 91) bad_spacing++;
          last_flash_bit = bitidx;
          nflash_seq++;
          if (tube_sel != 0) begin
            total_flash++;
            fork begin flash_sense <= 1; repeat (3) @(posedge clk); flash_sense <= 0; end join_none
          end
          if (nflash_seq == 1) seq_tubes.push_back(tube_sel);
        end
      end
    end
    if (!seq_gate && gate_d) begin
      seq_len.push_back(nflash_seq);
      if (nflash_seq == 5) n_five++;
      if (nflash_seq == 7) n_seven++;
      armed = 0; nflash_seq = 0;
    end
    c15_d <= clk15; gate_d <= seq_gate;
  end

  // ---------------- mechanism counters ----------------
  int n_hold = 0, n_del = 0, n_rev = 0, n_marker = 0;
  logic held_d = 0, mg_d = 0;
  always @(posedge clk) begin
    if (clock_held && !held_d) n_hold++;
    if (dut.deleted) n_del++;
    if (dut.reversal) n_rev++;
    if (marker_gate && !mg_d) n_marker++;
    held_d <= clock_held; mg_d <= marker_gate;
  end

  initial begin
    #(64'd16 * BASE * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_mm();
    int n;
    n = n_mm;
    wait (n_mm == n + 1);
    @(posedge clk);
  endtask

  initial begin
    int scan_k, mm0;
    longint t_hold;
    // Image.
    for (int w = 1; w <= 65; w++) for (int b = 1; b <= 21; b++) img[w][b] = 1'($urandom);
    for (int w = 1; w <= 59; w++) begin
      tval[w] = $urandom_range(0, 3000);
      for (int b = 18; b <= 21; b++) img[w][b] = ($urandom_range(0, 7) == 0);
    end
    tval[40] = 4095; tval[35] = 4094; tval[1] = 4092; tval[50] = 4091;
    for (int b = 13; b <= 17; b++) begin
      img[40][b] = 0; img[35][b] = 1; img[1][b] = 0; img[50][b] = 1;
    end
    img[40][13] = 1; img[40][15] = 1;      // tubes 1 and 3, five flashes
    img[1][14] = 1;                         // tube 2, five flashes
    for (int w = 1; w <= 59; w++) for (int i = 0; i < 12; i++) img[w][i+1] = tval[w][i];
    for (int j = 0; j < 10; j++) begin img[60][2*j+1] = 0; img[60][2*j+2] = VREF[j]; end
    img[60][21] = 0;
    for (int b = 1; b <= 21; b++) img[61][b] = 0;
    nc = 0;
    for (int w = 1; w <= 59; w++) for (int b = 18; b <= 21; b++) nc += img[w][b];

    repeat (5) @(posedge clk); rst_n = 1;
    wait_mm();
    #(30 * 4485 * PS * 10);
    // ---- injection 1 with epoch reset ----
    @(negedge clk); load_cmd = 1; @(negedge clk); load_cmd = 0;
    check("preload 1 after load command", mode, MODE_PRELOAD1);
    uplink_tone = 1;
    wait (clock_held);
    t_hold = cyc;
    repeat (3) @(posedge clk);
    begin int n1; n1 = 0;
      repeat (40000) begin @(posedge clk); if (bit_clk1 && !bc1_d) n1++; end
      check("no bit clock while held", n1, 0);
    end
    uplink_tone = 0;
    wait (bit_clk1); #1;
    check("restart on minute mark", minute_mark, 1);
    check("4 s pulse on restart", clk15, 1);
    repeat (3) @(posedge clk);
    check("preload 2 after restart", mode, MODE_PRELOAD2);
    wait_mm();
    check("preload 2 scan not normalized", period, BASE);
    check("load scan", mode, MODE_LOAD);
    wait_mm();
    check("post-load readout", mode, MODE_POSTLOAD);
    scan_k = 1;
    // ---- normal scans ----
    for (int s = 0; s < 7; s++) begin
      wait_mm();
      if (s == 0) begin
        int bad = 0;
        for (int i = 0; i < 1365; i++) if (rdprev[i] != img[i / 21 + 1][i % 21 + 1]) bad++;
        check("post-load readout equals image", bad, 0);
        check("normal mode after post-load", mode, MODE_NORMAL);
      end
      check($sformatf("scan %0d period", scan_k), period, BASE + PS * (nc + nv(scan_k)));
      scan_k++;
    end
    // ---- injection 2, no tone ----
    @(negedge clk); load_cmd = 1; @(negedge clk); load_cmd = 0;
    wait_mm();
    check("scan in preload 1 period", period, BASE + PS * (nc + nv(scan_k)));
    scan_k++;
    check("preload 2", mode, MODE_PRELOAD2);
    wait_mm();
    check("preload 2 period normalized", period, BASE + PS * (nc + nv(scan_k)));
    begin
      int bad = 0, v, n_done;
      n_done = scan_k - 1;        // scans processed before this readout
      for (int w = 1; w <= 59; w++) begin
        v = 0;
        for (int i = 0; i < 12; i++) v |= int'(rdprev[(w-1)*21 + i]) << i;
        if (v != (tval[w] + n_done) % 4096) begin
          bad++; $display("W%0d time %0d expected %0d", w, v, (tval[w] + n_done) % 4096);
        end
        for (int b = 13; b <= 21; b++) if (rdprev[(w-1)*21 + b - 1] != img[w][b]) bad++;
      end
      check("flash time words after scans", bad, 0);
      v = 0;
      for (int j = 0; j < 10; j++) v |= int'(rdprev[59*21 + 2*j]) << j;
      check("vernier counter", v, n_done);
      v = 0;
      for (int j = 0; j < 10; j++) v |= int'(rdprev[59*21 + 2*j + 1]) << j;
      check("vernier reference", v, VREF);
      v = 0;
      for (int b = 0; b < 21; b++) v |= int'(rdprev[60*21 + b]) << b;
      check("flash count word", v, total_flash);
    end
    // ---- flash sequences ----
    check("sequences seen", seq_len.size(), 3);
    if (seq_len.size() == 3) begin
      check("word 40: five flashes", seq_len[0], 5);
      check("word 40: tubes", seq_tubes[0], 4'b0101);
      check("word 35: seven flashes", seq_len[1], 7);
      check("word 35: tubes", seq_tubes[1], 4'b1111);
      check("word 1: five flashes", seq_len[2], 5);
      check("word 1: tubes", seq_tubes[2], 4'b0010);
    end
    check("first flash on the minute mark", first_on_mark, 3);
    check("flashes 4 s apart", bad_spacing, 0);
    check("flash count", total_flash, 17);
    // ---- mechanisms ----
    checks++; if (n_hold != 1)  begin failures++; $display("FAIL clock hold count %0d", n_hold); end
    checks++; if (n_del == 0)   begin failures++; $display("FAIL no deletions"); end
    checks++; if (n_five < 2)   begin failures++; $display("FAIL five flash sequences %0d", n_five); end
    checks++; if (n_seven < 1)  begin failures++; $display("FAIL seven flash sequences %0d", n_seven); end
    checks++; if (n_rev < 8)    begin failures++; $display("FAIL marker reversals %0d", n_rev); end
    checks++; if (n_marker < 8) begin failures++; $display("FAIL marker bursts %0d", n_marker); end
    $display("mechanisms: holds=%0d deletions=%0d five=%0d seven=%0d reversals=%0d markers=%0d flashes=%0d",
             n_hold, n_del, n_five, n_seven, n_rev, n_marker, total_flash);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
