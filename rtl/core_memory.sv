// core_memory: the 1365-bit coincident-current core plane (65 x 21).
//
// The plane is a sequential buffer: at every bit time one core, selected by
// an X line and a Y line of the coincidence switches, is read and then
// restored. A core read is destructive, so the unit always writes back:
// either the old bit, a modified bit (the serial adder), or new data from
// the ground during a load scan. The restore follows the read by about
// 200 us.
//
// Here the plane is an array indexed by X and Y line. The drive circuits,
// blocking-oscillator drivers, current stabilizers and sense amplifier are
// analog and are not modelled: `rd_stb` latches the addressed bit into the
// sense latch `rd_data` (held until the next read), and `wr_stb` writes
// `wr_data` back to the same address. The array read is non-destructive, so
// a read that is never restored (clock stopped in between) leaves the bit as
// it was; real core would lose it. The array has no reset, like the core.
module core_memory
  import geos_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t addr,
  input  logic  rd_stb,
  input  logic  wr_stb,
  input  logic  wr_data,
  output logic  rd_data
);
  logic [N_BITS-1:0] plane [N_WORDS];

  always_ff @(posedge clk) begin
    if (wr_stb) plane[addr.x][addr.y] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rd_data <= 1'b0;
    else if (rd_stb) rd_data <= plane[addr.x][addr.y];
  end

  initial assert (N_WORDS <= 128 && N_BITS <= 32) else $error("core_memory: address width");
endmodule
