// data_encoder: bipolar return-to-zero encoder of the memory readout.
//
// During an injection sequence the data line from the memory (the sense
// latch) is sent to the ground on a telemetry subcarrier as bipolar RZ
// data: in each bit time a positive pulse for a one or a negative pulse for
// a zero, and zero level for the rest of the bit. The pulse timing comes
// from flip-flop FF4, set by phi1 (the read) and cleared by phi2 3082
// pulses later, so each RZ pulse is 30.2 ms of the 43.96 ms bit. Using
// phi1/phi2 for FF4 is this design's reading; the document only says the
// encoder combines the data line with the output of FF4.
//
// Interface: `tm_pos`/`tm_neg` are the two polarities (never both high);
// both stay low when `tm_enable` is low.
module data_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic ph1_stb,
  input  logic ph2_stb,
  input  logic rd_data,
  input  logic tm_enable,
  output logic tm_pos,
  output logic tm_neg
);
  logic ff4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ff4 <= 1'b0;
    else if (ph1_stb) ff4 <= 1'b1;
    else if (ph2_stb) ff4 <= 1'b0;
  end

  assign tm_pos = tm_enable & ff4 & rd_data;
  assign tm_neg = tm_enable & ff4 & ~rd_data;
endmodule
