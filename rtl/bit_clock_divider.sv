// bit_clock_divider: 4485:1 divider that makes the two-phase memory bit clock.
//
// Three shift-register dividers of 5, 23 and 39 states are clocked in
// parallel by the normalized 102.04 kHz pulse train. Their lengths are
// mutually prime, so a given combination of their states recurs once every
// 5 x 23 x 39 = 4485 pulses: with 1365 bits per minute this is the memory
// bit clock of 22.75 pulses per second (43.956 ms period).
//
// Decoded phases (offsets are counted in input pulses from phase 1):
//  * phi1 (offset 0) reads a memory bit and advances everything serial;
//  * phi2 (offset PH2_OFFSET) follows phi1 by 3082 pulses, 30.207 ms as the
//    document gives. 3082 is a multiple of 23, so phi2 uses the same state
//    of the 23-stage register and other states of the 5- and 39-stage ones,
//    as described;
//  * restore (offset RESTORE_DLY) is the memory restore instant, 20 pulses
//    (about 196 us) after the read; the document puts the restore about
//    200 us after the read. Decoding it from the divider is this design's
//    choice.
//  * m39_stb is the phi2 state of the 39-stage register alone, one pulse in
//    39; it feeds the minute marker divider.
// Strobe outputs (*_stb) are one oscillator clock wide, in the clock where
// the input pulse moves the registers into the decoded state. ph1/ph2 are the
// 9.8 us wide levels (one input pulse period) that the document describes.
// `clr` holds all registers in their reset state; the first pulse after
// it is released produces phi1, so a stopped clock restarts on phase 1.
module bit_clock_divider
  import geos_pkg::*;
#(
  parameter int unsigned N_A         = 5,
  parameter int unsigned N_B         = 23,
  parameter int unsigned N_C         = 39,
  parameter int unsigned PH2_OFFSET  = 3082,
  parameter int unsigned RESTORE_DLY = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic tick,
  output logic ph1_stb,
  output logic ph2_stb,
  output logic restore_stb,
  output logic m39_stb,
  output logic ph1,
  output logic ph2
);
  localparam int unsigned WA = johnson_width(N_A);
  localparam int unsigned WB = johnson_width(N_B);
  localparam int unsigned WC = johnson_width(N_C);

  logic [WA-1:0] qa;
  logic [WB-1:0] qb;
  logic [WC-1:0] qc;

  sr_divider #(.N(N_A)) u_a (.clk, .rst_n, .clr, .en(tick), .q(qa), .wrap());
  sr_divider #(.N(N_B)) u_b (.clk, .rst_n, .clr, .en(tick), .q(qb), .wrap());
  sr_divider #(.N(N_C)) u_c (.clk, .rst_n, .clr, .en(tick), .q(qc), .wrap());

  // Register contents `k` pulses after phi1's predecessor state, for each
  // of the decoded offsets; the next input pulse is then phase offset k.
  localparam logic [WA-1:0] A_PH1 = WA'(johnson_state(N_A, 0));
  localparam logic [WB-1:0] B_PH1 = WB'(johnson_state(N_B, 0));
  localparam logic [WC-1:0] C_PH1 = WC'(johnson_state(N_C, 0));
  localparam logic [WA-1:0] A_PH2 = WA'(johnson_state(N_A, PH2_OFFSET % N_A));
  localparam logic [WB-1:0] B_PH2 = WB'(johnson_state(N_B, PH2_OFFSET % N_B));
  localparam logic [WC-1:0] C_PH2 = WC'(johnson_state(N_C, PH2_OFFSET % N_C));
  localparam logic [WA-1:0] A_RST = WA'(johnson_state(N_A, RESTORE_DLY % N_A));
  localparam logic [WB-1:0] B_RST = WB'(johnson_state(N_B, RESTORE_DLY % N_B));
  localparam logic [WC-1:0] C_RST = WC'(johnson_state(N_C, RESTORE_DLY % N_C));

  logic go;
  assign go          = tick & ~clr;
  assign ph1_stb     = go & (qa == A_PH1) & (qb == B_PH1) & (qc == C_PH1);
  assign ph2_stb     = go & (qa == A_PH2) & (qb == B_PH2) & (qc == C_PH2);
  assign restore_stb = go & (qa == A_RST) & (qb == B_RST) & (qc == C_RST);
  assign m39_stb     = go & (qc == C_PH2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph1 <= 1'b0;
      ph2 <= 1'b0;
    end else if (clr) begin
      ph1 <= 1'b0;
      ph2 <= 1'b0;
    end else if (tick) begin
      ph1 <= ph1_stb;
      ph2 <= ph2_stb;
    end
  end

  initial assert (RESTORE_DLY > 0 && RESTORE_DLY < PH2_OFFSET &&
                  PH2_OFFSET < N_A * N_B * N_C)
    else $error("bit_clock_divider: phase offsets out of order");
endmodule
