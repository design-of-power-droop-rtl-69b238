// space_compactor: compacts the S scan-chain outputs to the M MISR inputs.
//
// Output m is the XOR (the half-adder sum) of every chain k with
// k mod M == m, so a single wrong bit on any chain always shows on one
// output. The document gives the function, not the grouping; the grouping
// and M are this design's choice. Purely combinational.
module space_compactor #(
  parameter int unsigned S = 4,
  parameter int unsigned M = 2
) (
  input  logic [S-1:0] so,
  output logic [M-1:0] z
);

  always_comb begin
    z = '0;
    for (int k = 0; k < S; k++) z[k % M] = z[k % M] ^ so[k];
  end

endmodule
