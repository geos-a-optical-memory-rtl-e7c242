// ppm15_divider: 91:1 divider giving the 15 pulse/minute (4 second) clock.
//
// Two shift-register dividers of 7 and 13 states are advanced by every
// phi1 bit-clock strobe. 7 and 13 are mutually prime, so both stand in
// their decoded state once every 91 bit times: 1365 / 91 = 15 pulses per
// memory scan. Both registers reset to the state that decodes on the first
// phi1 after a clear, and the memory address resets to word 1 bit 1 at the
// same moment, so the first 4 second pulse of every minute coincides with
// word 1 bit 1 as the document requires.
//
// Interface: `ph1_stb` advances the divider; `tick` is the normalized
// 102 kHz pulse train, used only to time the width of the output level.
// `pulse15_stb` is a one-clock strobe, in the same clock as the phi1 strobe
// that produces it; `pulse15` is the 9.8 us wide level (one input pulse
// period) the optical sequence controller receives.
module ppm15_divider
  import geos_pkg::*;
#(
  parameter int unsigned N_A = 7,
  parameter int unsigned N_B = 13
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic tick,
  input  logic ph1_stb,
  output logic pulse15_stb,
  output logic pulse15
);
  localparam int unsigned WA = johnson_width(N_A);
  localparam int unsigned WB = johnson_width(N_B);

  logic [WA-1:0] qa;
  logic [WB-1:0] qb;

  sr_divider #(.N(N_A)) u_a (.clk, .rst_n, .clr, .en(ph1_stb), .q(qa), .wrap());
  sr_divider #(.N(N_B)) u_b (.clk, .rst_n, .clr, .en(ph1_stb), .q(qb), .wrap());

  assign pulse15_stb = ph1_stb & ~clr & (qa == '0) & (qb == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       pulse15 <= 1'b0;
    else if (clr)     pulse15 <= 1'b0;
    else if (tick)    pulse15 <= pulse15_stb;
  end
endmodule
