// prpg: variable-length pseudorandom pattern generator (top level).
//
// A Fibonacci linear feedback shift register of DEGREE flip-flops (3..15)
// whose feedback polynomial is chosen at run time: four characteristic
// polynomials of degree DEGREE are wired in as XNOR tap networks
// (prpg_feedback_taps), a 4:1 multiplexer driven by pattern_sel picks one
// (prpg_poly_mux), and its output is shifted into the register bank
// (prpg_register_bank). Primitive polynomials give all 2^DEGREE-1 patterns
// before repeating, non-primitive ones a shorter cycle, so the selector sets
// both the set of patterns and the cycle length (for DEGREE = 5: 21, 31, 31,
// 21 patterns for selectors 0..3, see prpg_pkg for every degree).
//
// Interface: clk, clear (active high, asynchronous: pattern becomes all
// zero), pattern_sel[1:0], pattern[DEGREE-1:0] (= register contents, newest
// bit in the MSB).
// Timing: one new pattern per clock edge; after clear the sequence is
// 0, then 2^(DEGREE-1), ... A change of pattern_sel applies from the next
// edge and continues from the current pattern.
// The structure, the XNOR taps, the common clear and the four polynomials
// per degree follow the published design; the default DEGREE = 5 is its
// detailed example. Clear polarity and the absence of any enable are this
// design's choices.
module prpg
  import prpg_pkg::*;
#(
  parameter int unsigned DEGREE = 5
) (
  input  logic              clk,
  input  logic              clear,
  input  pattern_sel_t      pattern_sel,
  output logic [DEGREE-1:0] pattern
);

  logic [NUM_POLY-1:0] fb;
  logic                fb_sel;

  prpg_feedback_taps #(.DEGREE(DEGREE)) u_taps (
    .q  (pattern),
    .fb (fb)
  );

  prpg_poly_mux #(.NUM_POLY(NUM_POLY)) u_mux (
    .fb          (fb),
    .pattern_sel (pattern_sel),
    .fb_sel      (fb_sel)
  );

  prpg_register_bank #(.DEGREE(DEGREE)) u_regs (
    .clk   (clk),
    .clear (clear),
    .fb_in (fb_sel),
    .q     (pattern)
  );

endmodule
