// geos_omcu: GEOS optical memory and control unit, top level.
//
// A delayed-command machine for a satellite's optical beacon. A 1365-bit
// core memory holds up to 59 flash requests (start minute, tube set, five or
// seven flashes) plus time-normalizer data and a flash count. The whole
// memory is read serially, processed and restored once per minute; each
// flash time word counts its start field up by one per scan and starts a
// flash sequence when the field overflows. A crystal-controlled divider
// chain produces the bit clock, the 4 second flash clock and the minute
// marker burst, and the normalizer deletes single prescaler pulses to trim
// the oscillator's integrated time error.
//
// Clock chain (all in the `clk` domain, 5 MHz - 50 ppm oscillator, with
// clock enables): PRESCALE:1 shift-register divider (49) -> clock control
// and delete circuit -> 4485:1 bit clock divider (phi1 read, restore, phi2)
// -> 91:1 divider for the 15 pulse/minute clock. The address (coincidence
// switch rings) steps at each restore, so each bit is read at phi1 and
// restored 20 prescaler periods later.
//
// Interface:
//  * clk, rst_n: shaped oscillator clock and power-on reset;
//  * load_cmd: one-clock strobe, decoded load command;
//  * uplink_tone: data one tone level (epoch reset during preload 1);
//  * uplink_data: decoded ground data, sampled at the restore of each bit
//    of the load scan (the bit after each minute_mark pulse is bit 1);
//  * flash_sense: flash sensor pulse, asynchronous, >= 2 clocks;
//  * tube_sel, seq_gate, clk15: to the optical sequence controller;
//  * marker_gate, marker_wave: minute marker burst modulation;
//  * tm_enable, tm_pos, tm_neg: bipolar RZ readout to the telemetry;
//  * bit_clk1, bit_clk2: 9.8 us phi1/phi2 bit clock levels;
//  * minute_mark: phi1 level while the scan is at word 1 bit 1;
//  * mode: injection mode register; clock_held: epoch reset in force.
// Output drivers, the data decoder and the oscillator are outside.
module geos_omcu
  import geos_pkg::*;
#(
  parameter int unsigned PRESCALE = 49
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_cmd,
  input  logic       uplink_tone,
  input  logic       uplink_data,
  input  logic       flash_sense,
  output logic [3:0] tube_sel,
  output logic       seq_gate,
  output logic       clk15,
  output logic       marker_gate,
  output logic       marker_wave,
  output logic       tm_enable,
  output logic       tm_pos,
  output logic       tm_neg,
  output logic       bit_clk1,
  output logic       bit_clk2,
  output logic       minute_mark,
  output logic [3:0] mode,
  output logic       clock_held
);
  logic  hold, norm_inhibit;
  logic  tick49, tick, deleted;
  logic  ph1_stb, ph2_stb, restore_stb, m39_stb;
  logic  pulse15_stb;
  addr_t addr;
  logic  w1b1;
  logic  rd_data, wr_data;
  mode_t mode_q;
  logic  delete_cmd, carry, ff1, flash_disable;
  logic  fc_gate, fc_bit;
  logic  seven, five, seq_start, reversal;
  logic [3:0] flash_count;

  sr_divider #(.N(PRESCALE)) u_prescale (
    .clk, .rst_n, .clr(hold), .en(1'b1), .q(), .wrap(tick49)
  );

  clock_control u_clkctl (
    .clk, .rst_n, .tick_in(tick49), .stop(hold), .delete_cmd,
    .inhibit(norm_inhibit), .tick_out(tick), .deleted
  );

  bit_clock_divider u_bitclk (
    .clk, .rst_n, .clr(hold), .tick, .ph1_stb, .ph2_stb, .restore_stb,
    .m39_stb, .ph1(bit_clk1), .ph2(bit_clk2)
  );

  ppm15_divider u_ppm15 (
    .clk, .rst_n, .clr(hold), .tick, .ph1_stb, .pulse15_stb, .pulse15(clk15)
  );

  epoch_reset u_epoch (
    .clk, .rst_n, .tone(uplink_tone), .pulse15_stb, .mode(mode_q),
    .hold, .norm_inhibit
  );

  cs_address u_addr (
    .clk, .rst_n, .clr(hold), .adv(restore_stb), .addr, .w1b1
  );

  core_memory u_core (
    .clk, .rst_n, .addr, .rd_stb(ph1_stb), .wr_stb(restore_stb), .wr_data, .rd_data
  );

  mode_control u_mode (
    .clk, .rst_n, .load_cmd, .rd_stb(ph1_stb), .w1b1, .mode(mode_q), .tm_enable
  );

  data_handling u_data (
    .clk, .rst_n, .rd_stb(ph1_stb), .wr_stb(restore_stb), .addr, .rd_data,
    .mode(mode_q), .uplink_data, .fc_gate, .fc_bit, .wr_data, .delete_cmd,
    .carry, .ff1, .flash_disable
  );

  flash_control u_flash (
    .clk, .rst_n, .wr_stb(restore_stb), .addr, .rd_data, .carry, .ff1,
    .flash_disable, .mode(mode_q), .tube_sel, .seq_gate, .seven, .five, .seq_start
  );

  flash_counter u_fcount (
    .clk, .rst_n, .rd_stb(ph1_stb), .wr_stb(restore_stb), .addr, .flash_sense,
    .fc_gate, .fc_bit, .count(flash_count)
  );

  marker_burst u_marker (
    .clk, .rst_n, .rd_stb(ph1_stb), .addr, .m39_stb, .marker_gate, .marker_wave,
    .reversal
  );

  data_encoder u_enc (
    .clk, .rst_n, .ph1_stb, .ph2_stb, .rd_data, .tm_enable, .tm_pos, .tm_neg
  );

  assign minute_mark = bit_clk1 & w1b1;
  assign mode        = mode_q;
  assign clock_held  = hold;
endmodule
