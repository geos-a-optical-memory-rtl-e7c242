// tb_data_handling: checks the per-bit processing over whole memory scans.
// The testbench plays the core memory (an array it reads and restores) and
// the flash counter (gate and serial count during word 61). The expected
// memory after each scan is worked out with integer arithmetic on whole
// words: initiate time fields of words 1-59 plus one modulo 4096, the odd
// bits of word 60 read as a counter plus one, word 61 plus the flash count,
// everything else unchanged. The expected number of delete commands is the
// number of ones in bits 18-21 of words 1-59, plus, for the vernier, one per
// counter carry out of odd bit 2j+1 whose reference bit 2j+2 is one. Also
// checked: the carry held at bit 13 of a word whose field was all ones, the
// flash disable set by word 1 and cleared in the post-load readout, and the
// load scan replacing all data with the uplink data.
module tb_data_handling;
  import geos_pkg::*;
  logic clk = 0, rst_n = 0, rd_stb = 0, wr_stb = 0;
  addr_t addr;
  logic rd_data = 0, uplink_data = 0, fc_gate = 0, fc_bit = 0;
  mode_t mode = MODE_NORMAL;
  logic wr_data, delete_cmd, carry, ff1, flash_disable;
  int checks = 0, failures = 0;

  bit mem [66][22];          // [word][bit], 1-based
  bit img [66][22];
  int n_del;
  int carries_seen;

  always #5 clk = ~clk;
  data_handling dut (.*);

  always @(posedge clk) if (delete_cmd) n_del++;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic int field(input int w, input int lo, input int n, input int step);
    int v = 0;
    for (int i = 0; i < n; i++) v |= int'(mem[w][lo + i * step]) << i;
    return v;
  endfunction

  // One scan. `fc` is the flash count given during word 61.
  task automatic scan(input int fc, input bit use_img);
    for (int w = 1; w <= 65; w++)
      for (int b = 1; b <= 21; b++) begin
        @(negedge clk);
        addr = addr_of(w, b); rd_data = mem[w][b]; rd_stb = 1;
        if (w == 61 && b == 1) fc_gate = 1;
        if (w == 62 && b == 1) fc_gate = 0;
        @(negedge clk); rd_stb = 0;
        fc_bit = (w == 61 && b <= 4) ? fc[b-1] : 1'b0;
        uplink_data = use_img ? img[w][b] : 1'b0;
        @(negedge clk); wr_stb = 1;
        if (w <= 59 && b == 13 && carry) carries_seen++;
        #1 mem[w][b] = wr_data;
        @(negedge clk); wr_stb = 0;
      end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_exp [60];
    int v_exp, c_exp, ndel_exp, nb, ref_bits, exp_carries;
    bit keep [66][22];
    repeat (3) @(posedge clk); rst_n = 1;
    // Build an image: random words, some fields near overflow.
    for (int w = 1; w <= 65; w++) for (int b = 1; b <= 21; b++) img[w][b] = 1'($urandom);
    for (int w = 1; w <= 59; w++) begin
      int t;
      t = (w % 7 == 0) ? 4095 - (w % 3) : int'($urandom_range(0, 4000));
      if (w == 1) t = 4094;
      for (int i = 0; i < 12; i++) img[w][i+1] = t[i];
    end
    for (int i = 0; i < 10; i++) img[60][2*i+1] = 0;       // vernier counter from 0
    for (int b = 1; b <= 21; b++) img[61][b] = 0;          // flash count 0
    // Load scan: memory starts random, must end equal to the image.
    for (int w = 1; w <= 65; w++) for (int b = 1; b <= 21; b++) mem[w][b] = 1'($urandom);
    mode = MODE_LOAD;
    scan(0, 1);
    begin int bad = 0;
      for (int w = 1; w <= 65; w++) for (int b = 1; b <= 21; b++) if (mem[w][b] != img[w][b]) bad++;
      check("load scan writes image", bad, 0);
    end
    ref_bits = field(60, 2, 10, 2);
    c_exp = 0; v_exp = 0;
    nb = 0;
    for (int w = 1; w <= 59; w++) for (int b = 18; b <= 21; b++) nb += mem[w][b];
    for (int s = 1; s <= 9; s++) begin
      int fc, vdel;
      mode = (s == 1) ? MODE_POSTLOAD : MODE_NORMAL;
      fc = $urandom_range(0, 15);
      for (int w = 1; w <= 59; w++) t_exp[w] = field(w, 1, 12, 1);
      exp_carries = 0;
      for (int w = 1; w <= 59; w++) if (t_exp[w] == 4095) exp_carries++;
      // Vernier deletions: carry out of counter bit j, reference bit j set.
      vdel = 0;
      for (int j = 0; j < 10; j++)
        if (((v_exp + 1) & ((1 << (j + 1)) - 1)) == 0 && ref_bits[j]) vdel++;
      for (int w = 1; w <= 65; w++) for (int b = 1; b <= 21; b++) keep[w][b] = mem[w][b];
      n_del = 0; carries_seen = 0;
      scan(fc, 0);
      ndel_exp = nb + vdel;
      check($sformatf("scan %0d delete commands", s), n_del, ndel_exp);
      check($sformatf("scan %0d carries held at B13", s), carries_seen, exp_carries);
      for (int w = 1; w <= 59; w++)
        check($sformatf("scan %0d W%0d time field", s, w), field(w, 1, 12, 1), (t_exp[w] + 1) % 4096);
      v_exp = (v_exp + 1) % 1024;
      check($sformatf("scan %0d vernier counter", s), field(60, 1, 10, 2), v_exp);
      check($sformatf("scan %0d vernier reference", s), field(60, 2, 10, 2), ref_bits);
      c_exp += fc;
      check($sformatf("scan %0d flash count word", s), field(61, 1, 21, 1), c_exp);
      begin int bad = 0;
        for (int w = 1; w <= 59; w++) for (int b = 13; b <= 21; b++) if (mem[w][b] != keep[w][b]) bad++;
        for (int w = 62; w <= 65; w++) for (int b = 1; b <= 21; b++) if (mem[w][b] != keep[w][b]) bad++;
        check($sformatf("scan %0d unchanged bits", s), bad, 0);
      end
      // Word 1 reaches 4095 at scan 1 and fires there: disable set in scan 1
      // but cleared while the post-load mode lasts; at scan 5 (after the
      // field wraps 4095 -> 0 -> ...) it stays clear.
      if (s == 1) check("disable held clear in post-load", flash_disable, 0);
    end
    // Word 1 fires again: set field to 4095 directly, normal mode.
    for (int i = 0; i < 12; i++) mem[1][i+1] = 1;
    mode = MODE_NORMAL;
    scan(0, 0);
    check("word 1 overflow sets flash disable", flash_disable, 1);
    mode = MODE_POSTLOAD;
    scan(0, 0);
    check("post-load clears flash disable", flash_disable, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
