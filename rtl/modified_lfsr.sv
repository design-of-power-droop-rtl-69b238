// modified_lfsr: the low-power test pattern generator.
//
// A primitive-polynomial LFSR whose stages feed the circuit under test,
// directly for ordinary inputs and through the AND/OR gate tree for heavy
// inputs, following the document's structure. Both views are brought out:
// 'state' is the raw LFSR (probability 1/2 per bit, used for the scan-chain
// phase shifter) and 'weighted' is the biased pattern for the CUT primary
// inputs.
//
// Timing: one LFSR step per clock with en; weighted follows state
// combinationally.
module modified_lfsr
  import lbist_pkg::*;
#(
  parameter int unsigned  W    = 16,
  parameter logic [W-1:0] TAPS = 16'hB400,
  parameter logic [W-1:0] SEED = 16'hACE1,
  parameter weight_e      WEIGHTS [W] = '{
    0: W_QUARTER, 1: W_QUARTER, 8: W_EIGHTH, 9: W_3QUARTER, 15: W_7EIGHTH,
    default: W_HALF}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [W-1:0] state,
  output logic [W-1:0] weighted
);

  prpg_lfsr #(.W(W), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .load, .en, .q(state)
  );

  weight_tree #(.W(W), .WEIGHTS(WEIGHTS)) u_tree (
    .q(state), .pi(weighted)
  );

endmodule
