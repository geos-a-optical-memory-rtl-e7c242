// cs_address: serial scan of the core plane by the coincidence switches.
//
// Each axis of the 65 x 21 core plane is driven by a magnetic coincidence
// switch matrix, and each matrix is itself driven by two ring counters of
// mutually prime length: 5 x 13 for the 65 X lines and 3 x 7 for the 21 Y
// lines. All four rings step together once per bit, so each matrix is
// scanned along its diagonal and, the plane axes being mutually prime too,
// the plane is scanned along its diagonal: word 1 bit 1 on X1/Y1, word 1
// bit 21 on X21/Y21, word 2 bit 1 on X22/Y1, and so on (the document's
// address allocation table). A full scan of 1365 steps is one minute.
//
// The rings are one-hot registers here. The selected line numbers are
// recovered from the ring positions by the Chinese remainder rule
// (x = 26*a5 + 40*a13 mod 65, y = 7*a3 + 15*a7 mod 21), which is what the
// switch matrix does physically: exactly one line has both of its rows
// selected. `addr` carries these line numbers; the address gates of the
// unit compare it with a word/bit position (geos_pkg::at_wb).
//
// Interface: `adv` steps to the next bit; `clr` (memory reset circuit)
// returns to word 1 bit 1, as does reset. `w1b1` is high while the scan
// stands on word 1 bit 1.
module cs_address
  import geos_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  adv,
  output addr_t addr,
  output logic  w1b1
);
  logic [2:0]  r3;
  logic [6:0]  r7;
  logic [4:0]  r5;
  logic [12:0] r13;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r3 <= 3'b1; r7 <= 7'b1; r5 <= 5'b1; r13 <= 13'b1;
    end else if (clr) begin
      r3 <= 3'b1; r7 <= 7'b1; r5 <= 5'b1; r13 <= 13'b1;
    end else if (adv) begin
      r3  <= {r3[1:0],  r3[2]};
      r7  <= {r7[5:0],  r7[6]};
      r5  <= {r5[3:0],  r5[4]};
      r13 <= {r13[11:0], r13[12]};
    end
  end

  // Position of the single set bit of a ring.
  function automatic int unsigned ring_pos(input logic [12:0] r);
    int unsigned p;
    p = 0;
    for (int unsigned i = 0; i < 13; i++) if (r[i]) p = i;
    return p;
  endfunction

  always_comb begin
    addr.x = xline_t'((26 * ring_pos(13'(r5)) + 40 * ring_pos(r13)) % N_WORDS);
    addr.y = yline_t'((7 * ring_pos(13'(r3)) + 15 * ring_pos(13'(r7))) % N_BITS);
  end

  assign w1b1 = (addr == addr_of(1, 1));
endmodule
