// tb_sr_divider: checks the shift-register divider for the lengths the unit
// uses (2, 5, 7, 13, 23, 39, 49). For each length it checks that `wrap`
// comes exactly once every N enables, that the register goes through N
// distinct states (no state repeats inside a cycle), that disabled clocks
// hold the state and that `clr` returns to state 0.
module tb_sr_divider;
  import geos_pkg::*;
  localparam int NN = 7;
  localparam int unsigned LENS [NN] = '{2, 5, 7, 13, 23, 39, 49};

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  int checks = 0, failures = 0;
  logic [NN-1:0] wrap;
  logic [MAX_JOHNSON-1:0] qs [NN];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NN; g++) begin : g_dut
    localparam int unsigned N = LENS[g];
    logic [johnson_width(N)-1:0] q;
    sr_divider #(.N(N)) dut (.clk, .rst_n, .clr, .en, .q, .wrap(wrap[g]));
    assign qs[g] = MAX_JOHNSON'(q);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_wrap [NN];
    int nwrap [NN];
    logic [MAX_JOHNSON-1:0] seen [NN][$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NN; i++) begin last_wrap[i] = -1; nwrap[i] = 0; end
    // Every register starts in state 0.
    @(negedge clk);
    for (int i = 0; i < NN; i++) begin
      checks++; if (qs[i] != '0) begin failures++; $display("FAIL reset state N=%0d", LENS[i]); end
    end
    for (int t = 0; t < 5 * 49; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      #1;
      for (int i = 0; i < NN; i++) begin
        if (en) begin
          // State must be the expected element of the twisted-ring series.
          if (wrap[i]) begin
            if (last_wrap[i] >= 0) begin
              checks++;
              if (seen[i].size() != LENS[i]) begin
                failures++; $display("FAIL N=%0d period %0d", LENS[i], seen[i].size());
              end
              for (int a = 0; a < seen[i].size(); a++)
                for (int b = a + 1; b < seen[i].size(); b++)
                  if (seen[i][a] == seen[i][b]) begin
                    failures++; $display("FAIL N=%0d repeated state", LENS[i]);
                  end
            end
            last_wrap[i] = t; nwrap[i]++;
            seen[i].delete();
          end
          seen[i].push_back(qs[i]);
        end else begin
          checks++; if (wrap[i]) begin failures++; $display("FAIL wrap without enable"); end
        end
      end
    end
    for (int i = 0; i < NN; i++) begin
      checks++;
      if (nwrap[i] < 2) begin failures++; $display("FAIL N=%0d too few wraps", LENS[i]); end
    end
    @(negedge clk); en = 1; clr = 1;
    @(negedge clk); clr = 0; en = 0;
    for (int i = 0; i < NN; i++) begin
      checks++; if (qs[i] != '0) begin failures++; $display("FAIL clr N=%0d", LENS[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
