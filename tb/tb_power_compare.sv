// tb_power_compare: switching-activity comparison behind the design's two
// low-power measures, over one 1024-pattern BIST session.
//
// Two copies of the scanned CUT receive identical scan operations and
// identical scan-in data from one LFSR through the phase shifter. Copy A
// gets its primary inputs from the AND/OR gate tree (the low-power TPG),
// copy B straight from the LFSR stages (a conventional TPG). The testbench
// counts bit toggles on the nets of the combinational logic (primary
// inputs, multiplier product, accumulator next state) in every cycle, as an
// unweighted stand-in for weighted switching activity, and checks that A
// switches less than B.
// It also counts the toggles the logic would see during shift with
// ordinary scan flip-flops (the shift flops themselves) against what it
// sees with the hold flops of this design (must be zero).
module tb_power_compare;
  import lbist_pkg::*;
  localparam int P = 1024;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] sel_q;
  bist_ctl_t ctl;
  logic [15:0] state, weighted, pi_a, pi_b, acc_a, acc_b;
  logic [3:0]  si, so_a, so_b;
  int checks = 0, failures = 0;
  longint tog_a = 0, tog_b = 0, tog_shift_plain = 0, tog_shift_hold = 0;

  bist_controller u_ctrl (.clk, .rst_n, .start, .sel(2'd3), .sel_q, .ctl);
  modified_lfsr   u_tpg (.clk, .rst_n, .load(ctl.tpg_load), .en(ctl.tpg_en), .state, .weighted);
  phase_shifter   u_ps (.q(state), .si);
  input_mux       u_mux_a (.clk, .rst_n, .test_mode(ctl.test_mode), .load(ctl.pi_load),
                           .normal_in(16'h0), .test_in(weighted), .pi(pi_a));
  input_mux       u_mux_b (.clk, .rst_n, .test_mode(ctl.test_mode), .load(ctl.pi_load),
                           .normal_in(16'h0), .test_in(state), .pi(pi_b));
  cut u_cut_a (.clk, .rst_n, .op(ctl.scan_op), .a(pi_a[7:0]), .b(pi_a[15:8]), .si, .so(so_a), .acc(acc_a));
  cut u_cut_b (.clk, .rst_n, .op(ctl.scan_op), .a(pi_b[7:0]), .b(pi_b[15:8]), .si, .so(so_b), .acc(acc_b));

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // logic-side nets of each copy
  logic [63:0] nets_a, nets_b, prev_a, prev_b;
  logic [15:0] sh_all, prev_sh, hold_all, prev_hold;
  assign nets_a = {pi_a, acc_a, u_cut_a.prod, u_cut_a.acc_next};
  assign nets_b = {pi_b, acc_b, u_cut_b.prod, u_cut_b.acc_next};
  assign sh_all = {u_cut_a.g_chain[3].u_chain.sh, u_cut_a.g_chain[2].u_chain.sh,
                   u_cut_a.g_chain[1].u_chain.sh, u_cut_a.g_chain[0].u_chain.sh};
  assign hold_all = acc_a;

  always @(posedge clk) begin
    if (rst_n && ctl.busy) begin
      tog_a += $countones(nets_a ^ prev_a);
      tog_b += $countones(nets_b ^ prev_b);
      if (ctl.scan_op == SC_SHIFT) begin
        tog_shift_plain += $countones(sh_all ^ prev_sh);
        tog_shift_hold  += $countones(hold_all ^ prev_hold);
      end
    end
    prev_a <= nets_a; prev_b <= nets_b; prev_sh <= sh_all; prev_hold <= hold_all;
  end

  initial begin
    int cycles;
    #12 rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 0;
    while (!ctl.done && cycles < 15000) begin @(negedge clk); cycles++; end
    check(ctl.done, "session finished");
    $display("logic-net toggles, low-power TPG: %0d  conventional TPG: %0d  reduction %0.1f%%",
             tog_a, tog_b, 100.0 * real'(tog_b - tog_a) / real'(tog_b));
    $display("scan-cell output toggles during shift, ordinary scan FF: %0d  hold scan FF: %0d",
             tog_shift_plain, tog_shift_hold);
    check(tog_b > 0 && tog_a < tog_b, "weighted heavy inputs lower logic switching");
    check(tog_shift_plain > 0 && tog_shift_hold == 0, "hold flops keep the logic quiet during shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
