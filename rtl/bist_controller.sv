// bist_controller: sequences one logic-BIST session.
//
// A start pulse (power-up BIST request) latches the test-length select and
// runs:
//   INIT     reload the LFSR seed, clear the MISR and the pass/fail result
//   SHIFT    L cycles: the chains shift the next pattern in and the last
//            response out; the LFSR steps each cycle; the scan-out is
//            compacted into the MISR except on the first load, when the
//            chains still hold functional state
//   UPDATE   1 cycle: scan cells apply the new vector, the primary-input
//            register takes the weighted TPG pattern
//   CAPTURE  1 cycle: the chains capture the logic response
//   ... repeated PAT_COUNTS[sel] times, then one more SHIFT pass that only
//   unloads, then
//   COMPARE  1 cycle: signature checked against the golden ROM
//   DONE     normal mode again (inputs from the normal pins) with done high
// In IDLE and DONE the CUT runs in normal mode. A session takes
// 1 + P*(L+2) + L + 1 cycles from the start edge to DONE.
// The document gives only the controller's duties; the state sequence, the
// pattern counts and the separate update cycle are this design's choice.
module bist_controller
  import lbist_pkg::*;
#(
  parameter int unsigned L          = 4,
  parameter int unsigned NSEL       = 4,
  parameter int unsigned PAT_COUNTS [NSEL] = '{16, 64, 256, 1024},
  parameter int unsigned CNT_W      = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [$clog2(NSEL)-1:0] sel,
  output logic [$clog2(NSEL)-1:0] sel_q,
  output bist_ctl_t               ctl
);

  typedef enum logic [2:0] {
    ST_IDLE, ST_INIT, ST_SHIFT, ST_UPDATE, ST_CAPTURE, ST_COMPARE, ST_DONE
  } state_e;

  localparam int unsigned SC_W = (L > 1) ? $clog2(L) : 1;

  state_e            state;
  logic [SC_W-1:0]   shift_cnt;
  logic [CNT_W-1:0]  pat_cnt, npat;
  logic              last_shift;

  assign last_shift = (shift_cnt == SC_W'(L - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      shift_cnt <= '0;
      pat_cnt   <= '0;
      npat      <= '0;
      sel_q     <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: if (start) begin
          state <= ST_INIT;
          sel_q <= sel;
          npat  <= CNT_W'(PAT_COUNTS[sel]);
        end
        ST_INIT: begin
          state     <= ST_SHIFT;
          shift_cnt <= '0;
          pat_cnt   <= '0;
        end
        ST_SHIFT: begin
          if (last_shift) begin
            shift_cnt <= '0;
            state     <= (pat_cnt == npat) ? ST_COMPARE : ST_UPDATE;
          end else begin
            shift_cnt <= shift_cnt + 1'b1;
          end
        end
        ST_UPDATE:  state <= ST_CAPTURE;
        ST_CAPTURE: begin
          pat_cnt <= pat_cnt + 1'b1;
          state   <= ST_SHIFT;
        end
        ST_COMPARE: state <= ST_DONE;
        default:    state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    ctl = '0;
    ctl.scan_op = SC_HOLD;
    unique case (state)
      ST_IDLE, ST_DONE: begin
        ctl.scan_op = SC_FUNC;
        ctl.pi_load = 1'b1;
        ctl.done    = (state == ST_DONE);
      end
      ST_INIT: begin
        ctl.test_mode  = 1'b1;
        ctl.tpg_load   = 1'b1;
        ctl.misr_clear = 1'b1;
        ctl.tra_clear  = 1'b1;
        ctl.busy       = 1'b1;
      end
      ST_SHIFT: begin
        ctl.test_mode = 1'b1;
        ctl.scan_op   = SC_SHIFT;
        ctl.tpg_en    = 1'b1;
        ctl.misr_en   = (pat_cnt != '0);
        ctl.busy      = 1'b1;
      end
      ST_UPDATE: begin
        ctl.test_mode = 1'b1;
        ctl.scan_op   = SC_UPDATE;
        ctl.pi_load   = 1'b1;
        ctl.busy      = 1'b1;
      end
      ST_CAPTURE: begin
        ctl.test_mode = 1'b1;
        ctl.scan_op   = SC_CAPTURE;
        ctl.busy      = 1'b1;
      end
      ST_COMPARE: begin
        ctl.test_mode = 1'b1;
        ctl.tra_check = 1'b1;
        ctl.busy      = 1'b1;
      end
      default: ;
    endcase
  end

  // Every update (launch) is followed directly by a capture.
  a_update_capture: assert property (@(posedge clk) disable iff (!rst_n)
      state == ST_UPDATE |=> state == ST_CAPTURE)
    else $error("bist_controller: update not followed by capture");

  // Each session must contain at least one pattern and fit the counter.
  for (genvar i = 0; i < NSEL; i++) begin : g_chk
    initial assert (PAT_COUNTS[i] > 0 && 64'(PAT_COUNTS[i]) < (64'd1 << CNT_W))
      else $error("bist_controller: PAT_COUNTS[%0d] out of range", i);
  end

endmodule
