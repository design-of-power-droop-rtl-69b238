// input_mux: chooses what drives the primary inputs of the circuit under test.
//
// test_mode = 0 selects the normal inputs, test_mode = 1 the test pattern
// generator's weighted pattern; the BIST controller drives test_mode. The
// selected value is registered: in normal mode the controller loads it every
// cycle, in BIST only in the update cycle, so the primary inputs stay
// constant while the scan chains shift. The register is this design's
// choice; the document describes only the multiplexer.
//
// Timing: pi changes on the clock edge after load.
module input_mux #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_mode,
  input  logic         load,
  input  logic [W-1:0] normal_in,
  input  logic [W-1:0] test_in,
  output logic [W-1:0] pi
);

  logic [W-1:0] sel;
  assign sel = test_mode ? test_in : normal_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pi <= '0;
    else if (load) pi <= sel;
  end

endmodule
