// geos_pkg: constants, types and helper functions shared by the optical
// memory and control unit.
//
// The core plane holds 1365 bits as 65 words of 21 bits. It is scanned
// serially along its diagonal: serial bit k (k = 0 for word 1 bit 1) sits on
// X line (k mod 65) and Y line (k mod 21), both counted from zero. Because
// 65 and 21 are mutually prime every crossing is visited once per scan. The
// Y line number is therefore the bit number within a word (minus one), and a
// particular word/bit position is recognised by the coincidence of one X
// line and one Y line, as the address gates of the unit do.
//
// The shift-register dividers of the clock chain are twisted-ring counters;
// johnson_state() gives the register contents after k clocks from the
// all-zero state, so that any state can be decoded by name (its index).
package geos_pkg;

  localparam int unsigned N_WORDS       = 65;   // X axis lines, words per scan
  localparam int unsigned N_BITS        = 21;   // Y axis lines, bits per word
  localparam int unsigned N_CELLS       = N_WORDS * N_BITS;  // 1365
  localparam int unsigned N_FLASH_WORDS = 59;   // words 1..59: flash time words
  localparam int unsigned VERNIER_WORD  = 60;   // normalizer vernier word
  localparam int unsigned COUNT_WORD    = 61;   // flash count word
  localparam int unsigned TIME_BITS     = 12;   // initiate time field, bits 1..12
  localparam int unsigned MAX_JOHNSON   = 32;   // widest shift-register divider

  typedef logic [6:0] xline_t;   // 0..64
  typedef logic [4:0] yline_t;   // 0..20

  // Memory address as the two coincidence switches present it.
  typedef struct packed {
    xline_t x;
    yline_t y;
  } addr_t;

  // Mode shift register, one-hot as in the unit: 1000 preload 1,
  // 0100 preload 2, 0010 load, 0001 post-load; 0000 is normal operation.
  typedef enum logic [3:0] {
    MODE_NORMAL   = 4'b0000,
    MODE_PRELOAD1 = 4'b1000,
    MODE_PRELOAD2 = 4'b0100,
    MODE_LOAD     = 4'b0010,
    MODE_POSTLOAD = 4'b0001
  } mode_t;

  // Address of word `word` (1..65), bit `bitn` (1..21).
  function automatic addr_t addr_of(input int unsigned word, input int unsigned bitn);
    int unsigned k;
    addr_t a;
    k   = (word - 1) * N_BITS + (bitn - 1);
    a.x = xline_t'(k % N_WORDS);
    a.y = yline_t'(k % N_BITS);
    return a;
  endfunction

  // Address gate: true when the scan is at word `word`, bit `bitn`.
  function automatic logic at_wb(input addr_t a, input int unsigned word,
                                 input int unsigned bitn);
    return a == addr_of(word, bitn);
  endfunction

  // Width of the twisted-ring register that divides by n (n >= 2).
  function automatic int unsigned johnson_width(input int unsigned n);
    return (n + 1) / 2;
  endfunction

  // Next state of an n-state twisted ring of width w. Even n: plain Johnson
  // counter (shift in the inverted last stage). Odd n: shift in the NOR of the
  // last two stages, which skips the all-ones state.
  function automatic logic [MAX_JOHNSON-1:0] johnson_next(input int unsigned n,
                                                          input logic [MAX_JOHNSON-1:0] q);
    int unsigned w;
    logic fb;
    w = johnson_width(n);
    if (n % 2 == 0) fb = ~q[w-1];
    else            fb = ~(q[w-1] | q[w-2]);
    return ((q << 1) | MAX_JOHNSON'(fb)) & ((MAX_JOHNSON'(1) << w) - 1);
  endfunction

  // Register contents k clocks after the all-zero state.
  function automatic logic [MAX_JOHNSON-1:0] johnson_state(input int unsigned n,
                                                           input int unsigned k);
    logic [MAX_JOHNSON-1:0] q;
    q = '0;
    for (int unsigned i = 0; i < k % n; i++) q = johnson_next(n, q);
    return q;
  endfunction

endpackage
