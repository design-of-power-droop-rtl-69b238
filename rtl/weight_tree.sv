// weight_tree: the AND/OR gate tree of the low-power test pattern generator.
//
// Inputs that cause many transitions inside the circuit under test ("heavy
// inputs") get a biased signal so that they toggle less often. As the
// document prescribes, probability 1/4 uses one AND gate, 1/8 a cascade of
// two AND gates, 3/4 one OR gate and 7/8 a cascade of two OR gates; all
// other inputs take one LFSR stage directly (probability 1/2).
// Output i combines stages i, i+1 and i+2 (mod W); that choice, and the
// default set of heavy inputs, are this design's own (in practice they come
// from a switching-activity analysis of the CUT).
//
// Purely combinational: pi follows q in the same cycle.
module weight_tree
  import lbist_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter weight_e     WEIGHTS [W] = '{
    0: W_QUARTER, 1: W_QUARTER, 8: W_EIGHTH, 9: W_3QUARTER, 15: W_7EIGHTH,
    default: W_HALF}
) (
  input  logic [W-1:0] q,
  output logic [W-1:0] pi
);

  for (genvar i = 0; i < W; i++) begin : g_in
    localparam int unsigned I1 = (i + 1) % W;
    localparam int unsigned I2 = (i + 2) % W;
    logic and1, or1;
    // first gate of each cascade
    assign and1 = q[i] & q[I1];
    assign or1  = q[i] | q[I1];
    always_comb begin
      unique case (WEIGHTS[i])
        W_QUARTER:  pi[i] = and1;
        W_EIGHTH:   pi[i] = and1 & q[I2];
        W_3QUARTER: pi[i] = or1;
        W_7EIGHTH:  pi[i] = or1 | q[I2];
        default:    pi[i] = q[i];
      endcase
    end
  end

endmodule
