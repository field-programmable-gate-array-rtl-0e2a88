// prpg_poly_mux: the polynomial multiplexer of the PRPG.
//
// It connects the feedback path of the polynomial chosen by the pattern
// selector to the register bank: fb_sel = fb[pattern_sel]. The multiplexer
// keeps NUM_POLY = 4 inputs for every degree, as in the published design.
//
// Interface: fb[NUM_POLY-1:0], pattern_sel[SEL_W-1:0] in; fb_sel out.
// Timing: purely combinational; a new selector value therefore changes the
// polynomial from the next clock edge on, without clearing the register.
module prpg_poly_mux #(
  parameter int unsigned NUM_POLY = 4,
  localparam int unsigned SEL_W   = $clog2(NUM_POLY)
) (
  input  logic [NUM_POLY-1:0] fb,
  input  logic [SEL_W-1:0]    pattern_sel,
  output logic                fb_sel
);

  always_comb fb_sel = fb[pattern_sel];

endmodule
