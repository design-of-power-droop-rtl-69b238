// misr: multiple-input signature register.
//
// Each enabled clock the register shifts up by one with the XOR of its
// tapped bits fed into bit 0 (the same primitive polynomial as the LFSR),
// and the M compacted response bits are XORed into bits M-1..0. After the
// test the register holds a W-bit signature of the whole response stream.
// Width, polynomial and injection points are this design's choice.
//
// Timing: clear (synchronous) zeroes the signature, en absorbs d on the
// clock edge; clear wins.
module misr #(
  parameter int unsigned  W    = 16,
  parameter int unsigned  M    = 2,
  parameter logic [W-1:0] TAPS = 16'hB400
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [M-1:0] d,
  output logic [W-1:0] sig
);

  logic [W-1:0] nxt;
  assign nxt = {sig[W-2:0], ^(sig & TAPS)} ^ W'(d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= nxt;
  end

  initial assert (M <= W) else $error("misr: M must not exceed W");

endmodule
