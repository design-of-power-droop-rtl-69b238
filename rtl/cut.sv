// cut: example circuit under test with full scan.
//
// A multiply-accumulate unit: acc <= acc + a*b on every functional clock.
// The 2N accumulator flip-flops are the scan flip-flops, arranged as S
// chains of L cells (accumulator bit k*L+c is cell c of chain k); the array
// multiplier and a 2N-bit adder are the combinational logic between them.
// During BIST the chains shift S bits per clock and the logic sees the held
// cell outputs, so it does not toggle while shifting. The document names an
// array multiplier as the circuit tested; wrapping it as an accumulator so
// that it has state flip-flops to scan is this design's choice.
//
// Timing: see scan_chain; acc is the held accumulator value.
module cut
  import lbist_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned S = 4,
  parameter int unsigned L = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  scan_op_e       op,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [S-1:0]   si,
  output logic [S-1:0]   so,
  output logic [2*N-1:0] acc
);

  logic [2*N-1:0] prod, acc_next;

  array_multiplier #(.N(N)) u_mul (.a, .b, .p(prod));
  assign acc_next = acc + prod;

  for (genvar k = 0; k < S; k++) begin : g_chain
    scan_chain #(.L(L)) u_chain (
      .clk, .rst_n, .op,
      .si (si[k]),
      .d  (acc_next[k*L +: L]),
      .q  (acc[k*L +: L]),
      .so (so[k])
    );
  end

  initial assert (S * L == 2 * N) else $error("cut: S*L must equal 2*N");

endmodule
