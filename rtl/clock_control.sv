// clock_control: clock control and delete circuit of the time normalizer.
//
// It sits on the output of the 49:1 prescaler (102.04 kHz pulses for a
// 5 MHz - 50 ppm oscillator) and produces the normalized pulse train that
// clocks the 4485:1 bit-clock divider. Two things remove pulses:
//  * a delete command from the data handling unit (a normalizer bit that is
//    one, or a vernier carry meeting a one reference bit) arms a pending
//    flag, and the next prescaler pulse is swallowed. Each command therefore
//    lengthens every later timing signal by one prescaler period (9.8 us);
//  * `stop` (clock held for an epoch reset) blocks every pulse.
// `inhibit` ignores delete commands; the unit asserts it during the preload
// and load scans of an injection that resets the clock epoch.
//
// Timing: all signals are single-clock strobes in the oscillator domain.
// A delete command may arrive at most once per bit time (4485 pulses), so a
// one-bit pending flag is enough. `deleted` pulses when a pulse is removed.
// The pending-flag form of the decision circuit is this design's own; the
// document gives only its effect (one pulse deleted per command).
module clock_control (
  input  logic clk,
  input  logic rst_n,
  input  logic tick_in,
  input  logic stop,
  input  logic delete_cmd,
  input  logic inhibit,
  output logic tick_out,
  output logic deleted
);
  logic pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= 1'b0;
    else if (delete_cmd && !inhibit) pending <= 1'b1;
    else if (tick_in && !stop) pending <= 1'b0;
  end

  assign deleted  = tick_in & ~stop & pending;
  assign tick_out = tick_in & ~stop & ~pending;
endmodule
