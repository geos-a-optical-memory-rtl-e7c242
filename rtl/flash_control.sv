// flash_control: flash sequence control, the buffer between the memory and
// the optical sequence controller.
//
// When a flash time word carries out of its initiate time field (carry held
// after bit 12), a flash sequence starts, provided no sequence is in
// progress, the flash disable is not set and no preload 1 readout is in
// progress. Bits 13-16 of that word are then loaded into the tube buffer
// FF1-FF4 (one flip-flop per flash tube, each driving a tube select gate),
// and bit 17 sets FF5 (seven flashes) or FF6 (five flashes). FF5/FF6 block
// new data until the sequence ends. At word 61 bit 3, 4.8 s before the
// minute mark, FF8 raises the sequence gate, which lets the sequence
// controller respond to the 4 second clock; its first pulse in the gate
// only arms the controller, so flashes fall on the minute mark and every
// 4 s after. At 16 s (word 18 bit 8) for five flashes, or 24 s (word 27
// bit 1) for seven, everything is cleared and the sequence is over. The
// preload 1 gate also clears everything, which removes any hang-up after
// power-on.
//
// Timing: all actions happen at `wr_stb`, the restore strobe of the bit,
// 200 us after the read. This keeps the end of the gate after the 4 second
// pulse that falls on the same bit, so the last flash of a sequence lies
// inside the gate; the choice of strobe is this design's. The end-of-
// sequence gates also require FF8, so a sequence started early in a scan is
// not ended by the end gate of that same scan (also this design's reading).
module flash_control
  import geos_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_stb,
  input  addr_t      addr,
  input  logic       rd_data,
  input  logic       carry,
  input  logic       ff1,
  input  logic       flash_disable,
  input  mode_t      mode,
  output logic [3:0] tube_sel,
  output logic       seq_gate,
  output logic       seven,
  output logic       five,
  output logic       seq_start
);
  logic can_init, fire, end_seq;

  assign can_init  = ~(seven | five) & ~flash_disable & (mode != MODE_PRELOAD1);
  assign fire      = wr_stb & ff1 & carry & can_init;
  assign seq_start = fire & (addr.y == yline_t'(16));
  assign end_seq   = wr_stb & seq_gate &
                     ((five  & at_wb(addr, 18, 8)) |
                      (seven & at_wb(addr, 27, 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tube_sel <= '0;
      seven    <= 1'b0;
      five     <= 1'b0;
      seq_gate <= 1'b0;
    end else if (mode == MODE_PRELOAD1 || end_seq) begin
      tube_sel <= '0;
      seven    <= 1'b0;
      five     <= 1'b0;
      seq_gate <= 1'b0;
    end else begin
      if (fire) begin
        case (addr.y)
          yline_t'(12): tube_sel[0] <= rd_data;
          yline_t'(13): tube_sel[1] <= rd_data;
          yline_t'(14): tube_sel[2] <= rd_data;
          yline_t'(15): tube_sel[3] <= rd_data;
          yline_t'(16): begin
            seven <= rd_data;
            five  <= ~rd_data;
          end
          default: ;
        endcase
      end
      if (wr_stb && (seven || five) && at_wb(addr, COUNT_WORD, 3)) seq_gate <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(seven && five));
endmodule
