// tra: test response analyzer (signature comparator).
//
// On check it compares the MISR signature with the golden signature from
// the ROM and registers the outcome: valid goes high and fail goes high if
// the two differ, i.e. the status line is raised when a fault is found. The
// result is held until clear (start of the next test) or reset.
//
// Timing: valid/fail change on the clock edge where check is high.
module tra #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         check,
  input  logic [W-1:0] sig,
  input  logic [W-1:0] golden,
  output logic         valid,
  output logic         fail
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      fail  <= 1'b0;
    end else if (clear) begin
      valid <= 1'b0;
      fail  <= 1'b0;
    end else if (check) begin
      valid <= 1'b1;
      fail  <= (sig != golden);
    end
  end

endmodule
