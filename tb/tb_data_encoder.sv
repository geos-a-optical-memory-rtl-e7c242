// tb_data_encoder: checks the bipolar RZ encoder. phi1 and phi2 strobes are
// given 100 and 70 clocks apart (scaled bit time). For random data bits it
// checks that each bit gives exactly one pulse of the right polarity,
// starting at phi1 and lasting until phi2 (70 clocks), none of the other
// polarity, and nothing while the telemetry is disabled.
module tb_data_encoder;
  logic clk = 0, rst_n = 0, ph1_stb = 0, ph2_stb = 0, rd_data = 0, tm_enable = 0;
  logic tm_pos, tm_neg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  data_encoder dut (.*);

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
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int npos, nneg;
      logic d;
      d = 1'($urandom);
      tm_enable = (n >= 4);
      @(negedge clk); ph1_stb = 1; rd_data = d;   // data latched with phi1
      @(negedge clk); ph1_stb = 0;
      npos = 0; nneg = 0;
      for (int c = 1; c < 100; c++) begin
        if (c == 70) begin ph2_stb = 1; end
        npos += tm_pos; nneg += tm_neg;
        checks++; if (tm_pos && tm_neg) failures++;
        @(negedge clk); ph2_stb = 0;
      end
      if (!tm_enable) begin
        check("silent when disabled", npos + nneg, 0);
      end else begin
        check("pulse width of the data polarity", d ? npos : nneg, 70);
        check("no pulse of the other polarity", d ? nneg : npos, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
