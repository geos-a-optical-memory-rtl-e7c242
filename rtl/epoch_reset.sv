// epoch_reset: clock reset circuit used to set the minute epoch to UT2.
//
// To put the satellite's minute mark in step with UT2, the ground station
// holds a data one tone on the command link during the first preload
// readout of an injection. The tone is sampled only during the 9.8 us
// 4 second clock pulses, which makes the circuit less sensitive to
// spurious commands. Once sampled, the clock dividers stop and stay reset,
// and the memory address stays at word 1 bit 1, until the tone is released.
// The scan then restarts exactly on word 1 bit 1.
//
// It also flags a time-change injection: from the stop until the post-load
// readout, the time normalizer is inhibited (`norm_inhibit` high during the
// preload and load scans of that injection).
//
// Interface: `tone` is the decoded tone level, asynchronous to the clock and
// synchronized here by two flip-flops; `pulse15_stb` is the 4 second clock
// strobe; `hold` stops and clears the clock chain and the address.
module epoch_reset
  import geos_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tone,
  input  logic  pulse15_stb,
  input  mode_t mode,
  output logic  hold,
  output logic  norm_inhibit
);
  logic tone_m, tone_s;
  logic time_change;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tone_m      <= 1'b0;
      tone_s      <= 1'b0;
      hold        <= 1'b0;
      time_change <= 1'b0;
    end else begin
      tone_m <= tone;
      tone_s <= tone_m;
      if (!tone_s)                                                hold <= 1'b0;
      else if (pulse15_stb && mode == MODE_PRELOAD1)              hold <= 1'b1;
      if (pulse15_stb && tone_s && mode == MODE_PRELOAD1)         time_change <= 1'b1;
      else if (mode == MODE_POSTLOAD || mode == MODE_NORMAL)      time_change <= 1'b0;
    end
  end

  assign norm_inhibit = time_change &
                        (mode == MODE_PRELOAD1 || mode == MODE_PRELOAD2 || mode == MODE_LOAD);
endmodule
