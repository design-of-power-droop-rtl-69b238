// lbist_top: scan-based logic BIST with a low-power test pattern generator.
//
// Data path of one session:
//   modified_lfsr --state--> phase_shifter --> scan-in of the S chains
//                 --weighted (AND/OR tree)--> input_mux --> CUT primary inputs
//   CUT scan-out --> space_compactor --> misr --> tra <-- golden_rom
// bist_controller sequences it (see there). The CUT is a multiply-
// accumulate unit (acc <= acc + a*b) whose 2N accumulator flip-flops form
// S chains of L cells. Two measures keep switching low during test, as the
// document proposes: heavy primary inputs get biased (rarely toggling)
// values from the AND/OR gate tree, and the scan cells hold their outputs
// while shifting so the logic only switches on update and capture.
//
// Interface: pulse start for one clock with sel choosing the test length
// (16/64/256/1024 patterns). busy is high during the session; then done
// rises and fail tells whether the signature differed from the golden one.
// Outside a session the CUT works in normal mode on a_in/b_in (registered
// one cycle) and acc_out shows its accumulator.
module lbist_top
  import lbist_pkg::*;
#(
  parameter int unsigned N = 8,         // operand width of the CUT
  parameter int unsigned S = 4,         // number of scan chains
  parameter int unsigned L = 4,         // scan cells per chain
  parameter int unsigned M = 2,         // MISR inputs
  parameter int unsigned W = 2 * N      // LFSR / MISR width = CUT inputs
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [1:0]     sel,
  input  logic [N-1:0]   a_in,
  input  logic [N-1:0]   b_in,
  output logic [2*N-1:0] acc_out,
  output logic           busy,
  output logic           done,
  output logic           fail,
  output logic [W-1:0]   signature
);

  bist_ctl_t      ctl;
  logic [1:0]     sel_q;
  logic [W-1:0]   tpg_state, tpg_weighted, pi;
  logic [S-1:0]   si, so;
  logic [M-1:0]   z;
  logic [W-1:0]   golden;
  logic           tra_valid;

  bist_controller #(.L(L)) u_ctrl (
    .clk, .rst_n, .start, .sel, .sel_q, .ctl
  );

  modified_lfsr #(.W(W)) u_tpg (
    .clk, .rst_n, .load(ctl.tpg_load), .en(ctl.tpg_en),
    .state(tpg_state), .weighted(tpg_weighted)
  );

  phase_shifter #(.W(W), .S(S)) u_ps (.q(tpg_state), .si);

  input_mux #(.W(W)) u_imux (
    .clk, .rst_n, .test_mode(ctl.test_mode), .load(ctl.pi_load),
    .normal_in({b_in, a_in}), .test_in(tpg_weighted), .pi
  );

  cut #(.N(N), .S(S), .L(L)) u_cut (
    .clk, .rst_n, .op(ctl.scan_op),
    .a(pi[N-1:0]), .b(pi[2*N-1:N]),
    .si, .so, .acc(acc_out)
  );

  space_compactor #(.S(S), .M(M)) u_sc (.so, .z);

  misr #(.W(W), .M(M)) u_misr (
    .clk, .rst_n, .clear(ctl.misr_clear), .en(ctl.misr_en), .d(z), .sig(signature)
  );

  golden_rom #(.W(W)) u_rom (.addr(sel_q), .data(golden));

  tra #(.W(W)) u_tra (
    .clk, .rst_n, .clear(ctl.tra_clear), .check(ctl.tra_check),
    .sig(signature), .golden, .valid(tra_valid), .fail
  );

  assign busy = ctl.busy;
  assign done = ctl.done & tra_valid;

  initial assert (W == 2 * N) else $error("lbist_top: W must equal 2*N");

  // The low-power rule of the scan scheme: nothing the CUT logic reads may
  // change across a shift clock.
  a_quiet_shift: assert property (@(posedge clk) disable iff (!rst_n)
      ctl.scan_op == SC_SHIFT |=> $stable(pi) && $stable(acc_out))
    else $error("lbist_top: CUT inputs changed during scan shift");

endmodule
