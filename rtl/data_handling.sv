// data_handling: per-bit processing of the memory data stream.
//
// Every bit read from the core is restored, possibly modified, within the
// same bit time. Three gate flip-flops, set and reset by address gates at
// the read strobe, select the treatment by word:
//  * FF1, word 1 bit 1 to word 60 bit 1 (the 59 flash time words): bits 1-12
//    go through a serial full adder whose other input is a one at bit 1, so
//    the initiate time field counts up by one per scan. The carry store is
//    cleared at bit 1; a carry out of bit 12 (the field was all ones) is
//    held for the rest of the word and starts a flash sequence in the flash
//    control. Bits 13-21 are restored unchanged; a one in bits 18-21 is a
//    time-normalizer delete command.
//  * FF2, word 60 bit 2 to word 61 bit 1 (normalizer vernier word, bit 1
//    still handled by FF1): toggle FF3 separates odd bits, which form a
//    counter (through the adder, carry rippling across the even bits), from
//    even bits, the fixed reference group, restored unchanged. A carry held
//    when an even reference bit reads one issues a delete command. The
//    result is a binary rate multiplier: the reference fraction r gives, on
//    average, r extra deletions per scan.
//  * the flash count gate of the flash counter (word 61): memory data and
//    the serial flash count go through the adder, accumulating the count.
// Other words are restored unchanged. During the load scan the restore
// data is the decoded ground data instead.
// The flash disable flip-flop (FF9) sets when a carry is held at word 1
// bit 18, i.e. when word 1, the last sequence of a load, has fired; it
// clears during the post-load readout.
//
// Timing: gate flip-flops change at `rd_stb` (phi1, the read), while the
// adder, carry store, restore data and delete command act at `wr_stb` (the
// restore, ~200 us later), with `addr` unchanged in between. `wr_data` is
// valid at `wr_stb`; `delete_cmd` is a one-clock pulse at `wr_stb`. `carry`
// and `ff1` are given to the flash control. The gate and adder structure
// follows the document; the clock edges on which each part acts are this
// design's choice.
module data_handling
  import geos_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rd_stb,
  input  logic  wr_stb,
  input  addr_t addr,
  input  logic  rd_data,
  input  mode_t mode,
  input  logic  uplink_data,
  input  logic  fc_gate,
  input  logic  fc_bit,
  output logic  wr_data,
  output logic  delete_cmd,
  output logic  carry,
  output logic  ff1,
  output logic  flash_disable
);
  logic ff2, ff3;
  logic bit1;
  logic add_en, add_x, add_y, add_cin, sum, cout;

  // Gate flip-flops, set and reset by address gates at the read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff1 <= 1'b0;
      ff2 <= 1'b0;
      ff3 <= 1'b0;
    end else if (rd_stb) begin
      if (at_wb(addr, 1, 1))                      ff1 <= 1'b1;
      else if (at_wb(addr, VERNIER_WORD, 2))      ff1 <= 1'b0;
      if (at_wb(addr, VERNIER_WORD, 2))           ff2 <= 1'b1;
      else if (at_wb(addr, COUNT_WORD, 1))        ff2 <= 1'b0;
      if (at_wb(addr, VERNIER_WORD, 2))           ff3 <= 1'b1;   // even bit
      else                                        ff3 <= ~ff3;
    end
  end

  // Serial full adder and its input selection.
  always_comb begin
    bit1    = (addr.y == '0);
    add_en  = 1'b0;
    add_x   = rd_data;
    add_y   = 1'b0;
    add_cin = carry;
    if (ff1 && addr.y < yline_t'(TIME_BITS)) begin
      add_en  = 1'b1;
      add_y   = bit1;
      add_cin = bit1 ? 1'b0 : carry;
    end else if (ff2 && !ff3) begin
      add_en  = 1'b1;
    end else if (fc_gate) begin
      add_en  = 1'b1;
      add_y   = fc_bit;
      add_cin = bit1 ? 1'b0 : carry;
    end
    sum  = add_x ^ add_y ^ add_cin;
    cout = (add_x & add_y) | (add_cin & (add_x ^ add_y));

    if (mode == MODE_LOAD) wr_data = uplink_data;
    else if (add_en)       wr_data = sum;
    else                   wr_data = rd_data;
  end

  assign delete_cmd = wr_stb & rd_data &
                      ((ff1 && addr.y >= yline_t'(17)) || (ff2 && ff3 && carry));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry         <= 1'b0;
      flash_disable <= 1'b0;
    end else begin
      if (wr_stb && add_en) carry <= cout;
      if (mode == MODE_POSTLOAD)                     flash_disable <= 1'b0;
      else if (wr_stb && carry && at_wb(addr, 1, 18)) flash_disable <= 1'b1;
    end
  end
endmodule
