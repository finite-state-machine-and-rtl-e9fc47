// dlo: the digital lac operon. The lac operon's control region is run as a
// finite state machine: the environment says whether lac repressor (R) and
// CAP (C) are present, a pseudo-random source decides where and when each
// molecule binds or leaves, and the machine reports each transcription
// event on out.
//
// How it works. One lac_fsm (the Lac module, with its 3-bit mem register)
// makes one transition per clock. Its five random bits come from an lfsr
// that advances five positions per clock, so every transition sees fresh
// bits: f = q[4:3], loc = q[2:1], sel = q[0]. R and C are ports, so a test
// bench or a surrounding circuit sets the conditions; the published design
// runs the machine under random conditions.
//
// Published: the Lac FSM, its mem register, R and C as inputs and the f,
// loc, sel bits drawn from an LFSR. This design's choices: the LFSR length,
// polynomial and seed (parameters), the bit assignment above, synchronous
// active-high reset, and bringing the random bits out on rnd for
// observation.
//
// Interface: clk, rst, r_in, c_in in; state, mem, out and rnd out. out is
// the code of the transition made at the last clock edge (00 none,
// 01/10/11 graded transcription). rnd holds the bits the next edge uses.
module dlo
  import lac_pkg::*;
#(
  parameter int unsigned      LFSR_WIDTH = 16,
  parameter logic [LFSR_WIDTH-1:0] LFSR_TAPS = 16'hD008,
  parameter logic [LFSR_WIDTH-1:0] LFSR_SEED = 16'hACE1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       r_in,
  input  logic       c_in,
  output lac_state_e state,
  output mem_t       mem,
  output lac_out_t   out,
  output lac_rand_t  rnd
);

  localparam int unsigned RAND_BITS = $bits(lac_rand_t);

  logic [LFSR_WIDTH-1:0] q;

  lfsr #(
    .WIDTH (LFSR_WIDTH),
    .TAPS  (LFSR_TAPS),
    .SEED  (LFSR_SEED),
    .STEPS (RAND_BITS)
  ) u_lfsr (
    .clk (clk),
    .rst (rst),
    .en  (1'b1),
    .q   (q)
  );

  assign rnd = lac_rand_t'(q[RAND_BITS-1:0]);

  lac_fsm u_lac (
    .clk   (clk),
    .rst   (rst),
    .r_in  (r_in),
    .c_in  (c_in),
    .f     (rnd.f),
    .loc   (rnd.loc),
    .sel   (rnd.sel),
    .state (state),
    .mem   (mem),
    .out   (out)
  );

endmodule
