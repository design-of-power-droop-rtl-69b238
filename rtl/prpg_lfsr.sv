// prpg_lfsr: conventional pseudo-random pattern generator.
//
// An external-feedback (Fibonacci) LFSR of W stages built on a primitive
// polynomial: the XOR of the tapped stages enters stage 0 and the register
// shifts towards the top. With the default taps (stages 15,13,12,10, i.e.
// x^16+x^14+x^13+x^11+1) the state runs through all 2^16-1 non-zero values.
// The polynomial, the seed and the width are this design's choices; the
// document asks only for a primitive-polynomial LFSR with one stage per CUT
// input.
//
// Timing: rst_n (asynchronous, active low) or load (synchronous) set the
// state to SEED; en advances one step per clock. q is the register itself.
module prpg_lfsr #(
  parameter int unsigned   W    = 16,
  parameter logic [W-1:0]  TAPS = 16'hB400,
  parameter logic [W-1:0]  SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [W-1:0] q
);

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= SEED;
    else if (load)  q <= SEED;
    else if (en)    q <= {q[W-2:0], fb};
  end

  initial assert (SEED != '0) else $error("prpg_lfsr: SEED must be non-zero");

endmodule
