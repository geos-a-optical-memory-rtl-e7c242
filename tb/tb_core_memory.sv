// tb_core_memory: checks the core plane. A random pattern is written to all
// 1365 word/bit positions, read back in a different order and compared with
// a reference copy kept by the testbench; the sense latch must hold its
// value between reads, and a read with no restore must leave the bit as it
// was.
module tb_core_memory;
  import geos_pkg::*;
  logic clk = 0, rst_n = 0, rd_stb = 0, wr_stb = 0, wr_data = 0;
  addr_t addr;
  logic rd_data;
  int checks = 0, failures = 0;
  bit ref_mem [65][21];

  always #5 clk = ~clk;
  core_memory dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int errs = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int w = 1; w <= 65; w++)
      for (int b = 1; b <= 21; b++) begin
        @(negedge clk);
        addr = addr_of(w, b); wr_data = 1'($urandom); wr_stb = 1;
        ref_mem[w-1][b-1] = wr_data;
        @(negedge clk); wr_stb = 0;
      end
    for (int b = 21; b >= 1; b--)
      for (int w = 65; w >= 1; w--) begin
        @(negedge clk); addr = addr_of(w, b); rd_stb = 1;
        @(negedge clk); rd_stb = 0;
        checks++;
        if (rd_data != ref_mem[w-1][b-1]) begin
          failures++;
          if (errs++ < 5) $display("FAIL W%0dB%0d read %0d", w, b, rd_data);
        end
        // Latch holds while the address moves.
        addr = addr_of(w == 1 ? 65 : w - 1, b);
        @(negedge clk);
        checks++; if (rd_data != ref_mem[w-1][b-1]) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
