// prpg_feedback_taps: the XNOR tap networks of the four characteristic
// polynomials of one degree.
//
// For polynomial p (0..3) the feedback bit is the XNOR of the register bits
// named by prpg_pkg::tap_mask(DEGREE, p): q[0] for the x^DEGREE term and
// q[DEGREE-k] for every middle term x^k. XNOR rather than XOR makes all-ones
// the lock-up pattern, so the all-zero pattern left by a clear is a valid
// start. All four networks are computed in parallel; prpg_poly_mux picks one.
//
// Interface: q[DEGREE-1:0] in, fb[3:0] out (bit p = feedback of polynomial p).
// Timing: purely combinational.
// XNOR taps and four polynomials per degree follow the published design; one
// wide XNOR per polynomial (rather than a chain of two-input gates) is this
// design's choice and computes the same function.
module prpg_feedback_taps
  import prpg_pkg::*;
#(
  parameter int unsigned DEGREE = 5
) (
  input  logic [DEGREE-1:0]   q,
  output logic [NUM_POLY-1:0] fb
);

  if (DEGREE < MIN_DEGREE || DEGREE > MAX_DEGREE) begin : g_bad_degree
    $error("prpg_feedback_taps: DEGREE must be in 3..15");
  end

  for (genvar p = 0; p < NUM_POLY; p++) begin : g_poly
    localparam term_set_t  MASK_FULL = tap_mask(DEGREE, p);
    localparam logic [DEGREE-1:0] MASK = MASK_FULL[DEGREE-1:0];
    assign fb[p] = ~^(q & MASK);
  end

endmodule
