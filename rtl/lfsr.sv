// lfsr: linear-feedback shift register, the random source of the digital lac
// operon. It supplies the f, loc and sel bits that choose among the outcomes
// of a Lac transition.
//
// How it works. A Fibonacci LFSR of WIDTH bits shifts left; the bit shifted
// in is the XOR of the bits selected by TAPS. The default taps give the
// maximal-length polynomial x^16 + x^15 + x^13 + x^4 + 1, period 2^16 - 1.
// To hand every transition fresh bits rather than a one-bit shift of the
// previous ones, the register advances STEPS positions per enabled clock
// (a leap-forward LFSR); q[STEPS-1:0] are then the STEPS newest bits.
// The all-zero state is a lock-up state and is never entered from a
// nonzero SEED.
//
// The use of an LFSR as the bit source follows the published design; its
// length, polynomial, seed and step count are this design's choices.
//
// Interface: clk; rst (synchronous, loads SEED); en (advance this cycle);
// q, the register, updated on the clock edge after en.
module lfsr #(
  parameter int unsigned          WIDTH = 16,
  parameter logic [WIDTH-1:0]     TAPS  = 16'hD008,
  parameter logic [WIDTH-1:0]     SEED  = 16'hACE1,
  parameter int unsigned          STEPS = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] q_next;

  always_comb begin
    q_next = q;
    for (int unsigned i = 0; i < STEPS; i++)
      q_next = {q_next[WIDTH-2:0], ^(q_next & TAPS)};
  end

  always_ff @(posedge clk) begin
    if (rst)     q <= SEED;
    else if (en) q <= q_next;
  end

  // A maximal-length LFSR must never reach the all-zero lock-up state.
  a_not_zero: assert property (@(posedge clk) disable iff (rst) q != '0);

endmodule
