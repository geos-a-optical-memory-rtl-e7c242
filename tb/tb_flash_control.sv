// tb_flash_control: checks the flash sequence control over whole scans.
// The testbench plays the data handling unit: it presents each bit with its
// address at the restore strobe, the flash word gate for words 1-59, and the
// carry held from bit 13 to bit 21 of a word chosen to fire. Expected
// behaviour, from the description: the tube buffer takes bits 13-16 of the
// firing word, bit 17 picks seven or five flashes, the sequence gate opens
// at word 61 bit 3 and closes at word 18 bit 8 (five) or word 27 bit 1
// (seven) of the next scan: 103 bit times to the minute mark, then 364
// (16 s) or 546 (24 s); a second
// firing word during a sequence is ignored; the flash disable and the
// preload 1 readout block a start, and preload 1 clears a sequence.
module tb_flash_control;
  import geos_pkg::*;
  logic clk = 0, rst_n = 0, wr_stb = 0, rd_data = 0, carry = 0, ff1 = 0, flash_disable = 0;
  addr_t addr;
  mode_t mode = MODE_NORMAL;
  logic [3:0] tube_sel;
  logic seq_gate, seven, five, seq_start;
  int checks = 0, failures = 0;
  int gate_len, n_start;

  always #5 clk = ~clk;
  flash_control dut (.*);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  always @(posedge clk) if (seq_start) n_start++;

  // One scan; words fw1/fw2 fire (0: none) with tube bits and seven flag.
  task automatic scan(input int fw1, input int fw2, input logic [3:0] tubes,
                      input logic [3:0] tubes2, input logic sev);
    for (int w = 1; w <= 65; w++)
      for (int b = 1; b <= 21; b++) begin
        @(negedge clk);
        addr = addr_of(w, b);
        ff1 = (w <= 59) || (w == 60 && b == 1);
        if (b == 13) carry = (w == fw1 || w == fw2);
        if (b == 1) carry = 0;
        rd_data = 1'($urandom);
        if (w == fw1 && b >= 13 && b <= 16) rd_data = tubes[b-13];
        if (w == fw2 && b >= 13 && b <= 16) rd_data = tubes2[b-13];
        if ((w == fw1 || w == fw2) && b == 17) rd_data = sev;
        wr_stb = 1;
        @(negedge clk); wr_stb = 0;
        if (seq_gate) gate_len++;
      end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    mode = MODE_PRELOAD1; repeat (2) @(negedge clk); mode = MODE_NORMAL;
    // Five flashes from word 40, tubes 1 and 3.
    gate_len = 0; n_start = 0;
    scan(40, 0, 4'b0101, 4'b0, 0);
    check("tubes from bits 13-16", tube_sel, 4'b0101);
    check("five flash gate", five, 1);
    check("seven flash gate clear", seven, 0);
    check("gate open at end of scan", seq_gate, 1);
    check("gate from W61B3 to end of scan", gate_len, 4 * 21 + 21 - 3 + 1);
    scan(0, 0, 0, 0, 0);
    check("five flash gate length", gate_len, 103 + 364);
    check("cleared after five flashes", {seven, five, seq_gate, tube_sel}, 0);
    // Seven flashes from word 35, tubes 1-4; word 45 fires too and is ignored.
    gate_len = 0;
    scan(35, 45, 4'b1111, 4'b0010, 1);
    check("first firing word wins", tube_sel, 4'b1111);
    check("seven flash gate", seven, 1);
    scan(0, 0, 0, 0, 0);
    check("seven flash gate length", gate_len, 103 + 546);
    check("cleared after seven flashes", {seven, five, seq_gate, tube_sel}, 0);
    // Early word (5): not ended in its own scan.
    gate_len = 0;
    scan(5, 0, 4'b1000, 0, 0);
    check("early word keeps its sequence", five, 1);
    scan(0, 0, 0, 0, 0);
    check("early word sequence length", gate_len, 103 + 364);
    // Flash disable blocks a start.
    flash_disable = 1;
    scan(50, 0, 4'b1111, 0, 1);
    check("disable blocks start", {seven, five, tube_sel}, 0);
    flash_disable = 0;
    // Preload 1 blocks a start, and clears a running sequence.
    mode = MODE_PRELOAD1;
    scan(50, 0, 4'b1111, 0, 1);
    check("preload 1 blocks start", {seven, five, tube_sel}, 0);
    mode = MODE_NORMAL;
    scan(50, 0, 4'b0011, 0, 1);
    check("start after preload 1", seven, 1);
    mode = MODE_PRELOAD1; @(negedge clk); mode = MODE_NORMAL;
    check("preload 1 clears", {seven, five, seq_gate, tube_sel}, 0);
    check("sequences started", n_start, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
