// scan_chain: L scan flip-flops whose outputs hold still while they shift.
//
// Each cell has two flops: a shift flop on the scan path and an output hold
// flop that drives the logic. During shift only the shift flops move, so the
// logic keeps seeing the last applied test vector and does not toggle; this
// is the property the document asks of the scan flip-flops and is what
// lowers the switching (and the supply droop) during shift. The exact cell
// is not drawn in the document; this two-flop form with a separate update
// step is this design's choice.
//
// Operations (lbist_pkg::scan_op_e), all on the rising clock edge:
//   SC_FUNC    shift and hold flops load d  (normal mode, an ordinary FF)
//   SC_SHIFT   si -> cell 0 -> ... -> cell L-1 -> so; hold flops keep
//   SC_UPDATE  hold flops load the shift flops (apply the new vector)
//   SC_CAPTURE shift flops load d (the response); hold flops keep
//   SC_HOLD    nothing changes
// so is the last shift flop; q are the hold flops. Reset clears both.
module scan_chain
  import lbist_pkg::*;
#(
  parameter int unsigned L = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  scan_op_e     op,
  input  logic         si,
  input  logic [L-1:0] d,
  output logic [L-1:0] q,
  output logic         so
);

  logic [L-1:0] sh;   // shift flops

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0;
      q  <= '0;
    end else begin
      unique case (op)
        SC_FUNC:    begin sh <= d; q <= d; end
        SC_SHIFT:   sh <= L'({sh, si});
        SC_UPDATE:  q  <= sh;
        SC_CAPTURE: sh <= d;
        default:    ;
      endcase
    end
  end

  assign so = sh[L-1];

endmodule
