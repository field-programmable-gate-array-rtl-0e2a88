// prpg_register_bank: the DEGREE D flip-flops of the Fibonacci LFSR.
//
// The flip-flops form one shift chain: on every rising clock edge the
// selected feedback bit fb_in is loaded into q[DEGREE-1] and each stage
// q[i] takes q[i+1], so the pattern moves towards q[0]. All flip-flops share
// one clear, which puts the chain in the all-zero starting pattern; with
// XNOR feedback that pattern is part of every sequence, so no seed input is
// needed.
//
// Interface: clk, clear (active high, asynchronous), fb_in, q[DEGREE-1:0].
// Timing: q changes one clock edge after fb_in is presented; clear acts at
// once and holds the chain at zero while it is high.
// The shift chain with a common clear and the all-zero start follow the
// published design; the clear polarity and its asynchronous action are this
// design's choice.
module prpg_register_bank
  import prpg_pkg::*;
#(
  parameter int unsigned DEGREE = 5
) (
  input  logic              clk,
  input  logic              clear,
  input  logic              fb_in,
  output logic [DEGREE-1:0] q
);

  if (DEGREE < MIN_DEGREE || DEGREE > MAX_DEGREE) begin : g_bad_degree
    $error("prpg_register_bank: DEGREE must be in 3..15");
  end

  always_ff @(posedge clk or posedge clear) begin
    if (clear) q <= '0;
    else       q <= {fb_in, q[DEGREE-1:1]};
  end

endmodule
