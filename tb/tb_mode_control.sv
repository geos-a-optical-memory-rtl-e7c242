// tb_mode_control: checks the injection mode register. Minute marks (a read
// strobe with `w1b1`) are given every 50 clocks, with other read strobes in
// between. Checked: normal mode holds across minute marks; a load command
// gives preload 1 at once; the next four minute marks step through
// preload 2, load, post-load and back to normal; the telemetry enable
// follows; a load command in the middle of an injection restarts it.
module tb_mode_control;
  import geos_pkg::*;
  logic clk = 0, rst_n = 0, load_cmd = 0, rd_stb = 0, w1b1 = 0;
  mode_t mode;
  logic tm_enable;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mode_control dut (.*);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %b expected %b", what, got, exp); end
  endtask

  task automatic minute();
    for (int i = 0; i < 5; i++) begin
      repeat (9) @(negedge clk);
      rd_stb = 1; w1b1 = (i == 4); @(negedge clk); rd_stb = 0; w1b1 = 0;
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check("reset normal", mode, MODE_NORMAL);
    minute(); check("normal holds", mode, MODE_NORMAL);
    check("no telemetry", tm_enable, 0);
    repeat (3) @(negedge clk);
    load_cmd = 1; @(negedge clk); load_cmd = 0;
    check("load command -> preload 1", mode, MODE_PRELOAD1);
    check("telemetry on", tm_enable, 1);
    minute(); check("-> preload 2", mode, MODE_PRELOAD2);
    minute(); check("-> load", mode, MODE_LOAD);
    minute(); check("-> post-load", mode, MODE_POSTLOAD);
    check("telemetry on in post-load", tm_enable, 1);
    minute(); check("-> normal", mode, MODE_NORMAL);
    check("telemetry off", tm_enable, 0);
    load_cmd = 1; @(negedge clk); load_cmd = 0;
    minute(); minute(); check("second injection at load", mode, MODE_LOAD);
    load_cmd = 1; @(negedge clk); load_cmd = 0;
    check("restart at preload 1", mode, MODE_PRELOAD1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
