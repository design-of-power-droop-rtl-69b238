// golden_rom: read-only store of the fault-free signatures.
//
// One W-bit golden signature per selectable test length, read
// asynchronously by address. The default contents are the signatures the
// fault-free default lbist_top produces for 16, 64, 256 and 1024 patterns
// (addresses 0..3), computed with a bit-level model of the default design
// (LFSR seed 16'hACE1, the default weights, phase-shifter taps, 4 chains of
// 4 cells, MISR clear at test start). Change any of those and the contents
// must be recomputed. The number of entries is this design's choice.
module golden_rom #(
  parameter int unsigned  W     = 16,
  parameter int unsigned  DEPTH = 4,
  parameter logic [W-1:0] CONTENTS [DEPTH] = '{16'h92B0, 16'h38FD, 16'h2DAD, 16'h3A99}
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [W-1:0]             data
);

  assign data = CONTENTS[addr];

endmodule
