// sr_divider: shift-register frequency divider, divide by N.
//
// The unit's dividers are synchronous shift registers with a feedback loop
// that makes the register cycle through a fixed series of N states; decoding
// one state of the series divides the clock by N. Here the register is a
// twisted ring (Johnson) counter of ceil(N/2) stages. For even N the inverted
// last stage is fed back; for odd N the NOR of the last two stages is fed
// back, which drops the all-ones state and leaves 2*ceil(N/2)-1 = N states.
// The feedback form is this design's choice; the document only says that
// each register has a feedback loop and a fixed cycle of states.
//
// Interface: `en` advances the register by one state (a clock enable in the
// single clock domain of the unit); `clr` returns it synchronously to the
// all-zero state (state 0), which is also the reset state. `q` is the
// register itself, so that the parent can decode any state with
// geos_pkg::johnson_state(N, k). `wrap` is high during the enable that takes
// the register from state N-1 back to state 0: one pulse every N enables.
module sr_divider
  import geos_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clr,
  input  logic                        en,
  output logic [johnson_width(N)-1:0] q,
  output logic                        wrap
);
  localparam int unsigned W = johnson_width(N);
  localparam logic [W-1:0] LAST = W'(johnson_state(N, N - 1));

  logic [MAX_JOHNSON-1:0] q_wide, q_next;

  initial assert (N >= 2 && W <= MAX_JOHNSON) else $error("sr_divider: N out of range");

  always_comb begin
    q_wide = MAX_JOHNSON'(q);
    q_next = johnson_next(N, q_wide);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= q_next[W-1:0];
  end

  assign wrap = en & ~clr & (q == LAST);
endmodule
