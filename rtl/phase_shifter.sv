// phase_shifter: XOR network between the LFSR and the scan chains.
//
// Expands the W LFSR stages to the S scan-chain inputs: chain k receives the
// XOR of the stages set in MASKS[k]. Using different stages for each chain
// removes the shifted-copy correlation adjacent chains would otherwise see.
// The tap sets (three stages per chain) are this design's choice.
//
// Purely combinational.
module phase_shifter #(
  parameter int unsigned  W = 16,
  parameter int unsigned  S = 4,
  parameter logic [W-1:0] MASKS [S] = '{
    16'b0000_0100_0010_0001,   // chain 0: stages 0, 5, 10
    16'b0010_0000_1000_0010,   // chain 1: stages 1, 7, 13
    16'b0100_0010_0000_0100,   // chain 2: stages 2, 9, 14
    16'b0000_1000_0100_1000}   // chain 3: stages 3, 6, 11
) (
  input  logic [W-1:0] q,
  output logic [S-1:0] si
);

  always_comb begin
    for (int k = 0; k < S; k++) si[k] = ^(q & MASKS[k]);
  end

endmodule
