// tb_flash_counter: checks the flash monitor accumulator. Sensor pulses
// (3 clocks wide) are given at random times during scans with a short bit
// time. At each word 61 the serial bits read at the restore strobes must
// spell, LSB first, the number of pulses given since the previous word 61
// bit 1 read (modulo 16), followed by zeros; the flash count gate must cover
// exactly the 21 bits of word 61.
module tb_flash_counter;
  import geos_pkg::*;
  logic clk = 0, rst_n = 0, rd_stb = 0, wr_stb = 0, flash_sense = 0;
  addr_t addr;
  logic fc_gate, fc_bit;
  logic [3:0] count;
  int checks = 0, failures = 0;
  int pulses = 0;

  always #5 clk = ~clk;
  flash_counter dut (.*);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int snap, val, gate_bits, rate;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 6; s++) begin
      rate = (s == 3) ? 40 : 300;      // scan 3 overflows the 4-bit counter
      val = 0; gate_bits = 0;
      for (int w = 1; w <= 65; w++)
        for (int b = 1; b <= 21; b++) begin
          @(negedge clk); addr = addr_of(w, b); rd_stb = 1;
          @(negedge clk); rd_stb = 0;
          if (w == 61 && b == 1) begin snap = pulses; pulses = 0; end
          // A sensor pulse now and then, never straddling the snapshot.
          if (!(w == 61 && b == 1) && $urandom_range(0, rate) == 0) begin
            flash_sense = 1; repeat (3) @(negedge clk); flash_sense = 0;
            pulses++;
          end
          repeat (4) @(negedge clk);
          wr_stb = 1;
          if (fc_gate) begin
            gate_bits++;
            checks++;
            if (w != 61) begin failures++; $display("FAIL gate outside word 61"); end
            val |= int'(fc_bit) << (b - 1);
          end
          @(negedge clk); wr_stb = 0;
        end
      if (s > 0) begin
        check($sformatf("scan %0d count word value", s), val, snap % 16);
        check($sformatf("scan %0d gate bits", s), gate_bits, 21);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
