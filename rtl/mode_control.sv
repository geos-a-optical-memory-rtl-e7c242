// mode_control: mode shift register of the injection sequence.
//
// A decoded load command from the ground sets the first stage (1000,
// preload readout 1). At every word 1 bit 1 read (the internal minute mark)
// the register shifts right: 0100 preload readout 2, 0010 load scan, 0001
// post-load readout, and then 0000, normal operation. Preload 1 is usually
// a partial scan, because the command arrives at an arbitrary time in the
// minute; the other three are full scans. While the register is non-zero
// the memory readout is sent to the ground (`tm_enable`).
//
// Interface: `load_cmd` is a one-clock strobe from the command decoder;
// `rd_stb`/`w1b1` mark the read of word 1 bit 1. The shift takes effect at
// that read, so the whole of word 1 bit 1 is already handled in the new
// mode (for the load scan this means all 1365 bits are replaced). A load
// command during an injection restarts it at preload 1 (this design's
// choice; the document does not say).
module mode_control
  import geos_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_cmd,
  input  logic  rd_stb,
  input  logic  w1b1,
  output mode_t mode,
  output logic  tm_enable
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                mode <= MODE_NORMAL;
    else if (load_cmd)         mode <= MODE_PRELOAD1;
    else if (rd_stb && w1b1)   mode <= mode_t'({1'b0, mode[3:1]});
  end

  assign tm_enable = (mode != MODE_NORMAL);

  // The register is one-hot or empty at all times.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(mode));
endmodule
