// flash_counter: flash monitor, the four-bit accumulator of actual flashes.
//
// Each time tubes fire, a flash sensor near them gives a pulse; the pulses
// are counted in a four-bit binary accumulator (FF9-FF12). At word 61 the
// count is shifted out, least significant bit first, into the serial adder
// of the data handling unit, which adds it to the flash count word in
// memory. Four bits leave room beyond the seven flashes of one sequence in
// case of a malfunction. The unit also generates the flash count word gate,
// from word 61 bit 1 to word 62 bit 1.
//
// Here the count is copied into a separate shift register at the read of
// word 61 bit 1 and the accumulator restarts from zero, so a flash during
// the shift-out is not lost but counted for the next scan; the document
// shifts the accumulator itself. The sensor input is asynchronous and is
// synchronized and edge-detected; a sensor pulse must last at least two
// clock periods.
//
// Interface: `fc_gate` and `fc_bit` go to the data handling unit; `fc_bit`
// is valid at each `wr_stb` of word 61 and the register shifts there.
module flash_counter
  import geos_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rd_stb,
  input  logic  wr_stb,
  input  addr_t addr,
  input  logic  flash_sense,
  output logic  fc_gate,
  output logic  fc_bit,
  output logic [3:0] count
);
  logic s_m, s_s, s_d, sense_edge;
  logic [3:0] shreg;

  assign sense_edge = s_s & ~s_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_m     <= 1'b0;
      s_s     <= 1'b0;
      s_d     <= 1'b0;
      count   <= '0;
      shreg   <= '0;
      fc_gate <= 1'b0;
    end else begin
      s_m <= flash_sense;
      s_s <= s_m;
      s_d <= s_s;
      if (rd_stb && at_wb(addr, COUNT_WORD, 1)) begin
        shreg <= count;
        count <= {3'b000, sense_edge};
      end else begin
        if (sense_edge) count <= count + 4'd1;
        if (wr_stb && fc_gate) shreg <= {1'b0, shreg[3:1]};
      end
      if (rd_stb && at_wb(addr, COUNT_WORD, 1))      fc_gate <= 1'b1;
      else if (rd_stb && at_wb(addr, COUNT_WORD + 1, 1)) fc_gate <= 1'b0;
    end
  end

  assign fc_bit = shreg[0];
endmodule
