// array_multiplier: N x N unsigned array multiplier.
//
// The combinational logic of the example circuit under test. Partial
// product row i is a & {N{b[i]}}. Row 0 is taken as is; each further row is
// added to the running sum shifted right by one, with a ripple row of one
// half adder (bit 0) and N-1 full adders. Each row retires one product bit;
// the last row's sum and carry give the top N bits. Delay grows as about
// 2N adder stages. The document names an array multiplier but does not
// draw it; this row-ripple arrangement is this design's choice.
module array_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // sum[i] : N-bit row result after adding partial product i, carry[i] its carry out
  logic [N-1:0] sum   [N];
  logic         carry [N];

  assign sum[0]   = a & {N{b[0]}};
  assign carry[0] = 1'b0;
  assign p[0]     = sum[0][0];

  for (genvar i = 1; i < N; i++) begin : g_row
    logic [N-1:0] pp, prev;
    logic [N:0]   c;
    assign pp   = a & {N{b[i]}};
    assign prev = {carry[i-1], sum[i-1][N-1:1]};
    half_adder u_ha (.a(pp[0]), .b(prev[0]), .s(sum[i][0]), .c(c[1]));
    for (genvar j = 1; j < N; j++) begin : g_col
      full_adder u_fa (.a(pp[j]), .b(prev[j]), .ci(c[j]), .s(sum[i][j]), .co(c[j+1]));
    end
    assign carry[i] = c[N];
    assign c[0]     = 1'b0;
    assign p[i]     = sum[i][0];
  end

  assign p[2*N-1:N] = {carry[N-1], sum[N-1][N-1:1]};

endmodule
