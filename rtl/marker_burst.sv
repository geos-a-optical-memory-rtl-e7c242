// marker_burst: minute marker burst generator.
//
// The satellite marks each minute by a burst of square-wave phase
// modulation on its transmitters. The phi2 state of the 39-stage register of
// the bit-clock divider (one pulse in 39 normalized 102 kHz pulses) is gated
// into a 7:1 shift-register divider, whose output drives a toggle flip-flop:
// 102.04 kHz / 39 / 7 / 2 = 186.88 Hz. The burst starts at word 65 bit 14
// and ends at word 1 bit 2. The first 7:1 output pulse after word 1 bit 1
// (the internal one-minute mark) is deleted, so the toggle misses one
// transition: a 180 degree phase reversal that ground equipment times.
// There are about 66 cycles before the reversal and 8 after it.
//
// Interface: `rd_stb` is the phi1 strobe at which `addr` names the bit being
// read; `m39_stb` is the 39:1 strobe. `marker_gate` is high for the burst,
// `marker_wave` is the square wave (low outside the burst), `reversal`
// pulses for the deleted divider pulse. The 7:1 divider and the toggle are
// held cleared outside the burst so that every burst starts in the same
// phase; that clearing is this design's choice.
module marker_burst
  import geos_pkg::*;
#(
  parameter int unsigned N_DIV = 7
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rd_stb,
  input  addr_t addr,
  input  logic  m39_stb,
  output logic  marker_gate,
  output logic  marker_wave,
  output logic  reversal
);
  logic         div_out;
  logic         rev_pending;
  logic         tff;

  sr_divider #(.N(N_DIV)) u_div (
    .clk, .rst_n, .clr(~marker_gate), .en(m39_stb), .q(), .wrap(div_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      marker_gate <= 1'b0;
      rev_pending <= 1'b0;
      tff         <= 1'b0;
    end else begin
      if (rd_stb && at_wb(addr, N_WORDS, 14)) marker_gate <= 1'b1;
      else if (rd_stb && at_wb(addr, 1, 2))   marker_gate <= 1'b0;

      if (rd_stb && at_wb(addr, 1, 1))        rev_pending <= 1'b1;
      else if (div_out || !marker_gate)       rev_pending <= 1'b0;

      if (!marker_gate)                       tff <= 1'b0;
      else if (div_out && !rev_pending)       tff <= ~tff;
    end
  end

  assign reversal    = div_out & rev_pending & marker_gate;
  assign marker_wave = marker_gate & tff;
endmodule
