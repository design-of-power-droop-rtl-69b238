// tb_bist_controller: runs one session for each test length and checks the
// control sequence: the session length 1 + P*(L+2) + L + 1 cycles, the
// number of shift, update, capture, LFSR-step and MISR-enable cycles, the
// single seed load/clear and compare, normal mode outside the session, and
// that each update is followed by a capture.
module tb_bist_controller;
  import lbist_pkg::*;
  localparam int L = 4;
  localparam int PATS [4] = '{16, 64, 256, 1024};
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] sel = 0, sel_q;
  bist_ctl_t ctl;
  int checks = 0, failures = 0;

  bist_controller dut (.clk, .rst_n, .start, .sel, .sel_q, .ctl);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    check(!ctl.test_mode && ctl.scan_op == SC_FUNC && ctl.pi_load && !ctl.busy && !ctl.done,
          "idle is normal mode");
    for (int s = 0; s < 4; s++) begin
      int cycles, n_shift, n_upd, n_cap, n_tpg, n_misr, n_load, n_cmp, n_clear;
      scan_op_e prev;
      cycles = 0; n_shift = 0; n_upd = 0; n_cap = 0; n_tpg = 0; n_misr = 0;
      n_load = 0; n_cmp = 0; n_clear = 0; prev = SC_HOLD;
      sel = 2'(s); start = 1;
      @(negedge clk); start = 0; sel = 2'(3 - s);
      while (!ctl.done && cycles < 10000) begin
        check(ctl.busy && ctl.test_mode, "busy and test mode during session");
        if (ctl.scan_op == SC_SHIFT) n_shift++;
        if (ctl.scan_op == SC_UPDATE) begin n_upd++; check(ctl.pi_load, "PI load on update"); end
        if (ctl.scan_op == SC_CAPTURE) begin n_cap++; check(prev == SC_UPDATE, "capture follows update"); end
        if (ctl.tpg_en) n_tpg++;
        if (ctl.misr_en) n_misr++;
        if (ctl.tpg_load) n_load++;
        if (ctl.tra_check) n_cmp++;
        if (ctl.misr_clear) n_clear++;
        prev = ctl.scan_op;
        cycles++;
        @(negedge clk);
      end
      check(sel_q == 2'(s), "select latched at start");
      check(cycles == 1 + PATS[s] * (L + 2) + L + 1,
            $sformatf("sel %0d: %0d cycles, expected %0d", s, cycles, 1 + PATS[s] * (L + 2) + L + 1));
      check(n_shift == (PATS[s] + 1) * L && n_tpg == n_shift, "shift / LFSR step count");
      check(n_upd == PATS[s] && n_cap == PATS[s], "update / capture count");
      check(n_misr == PATS[s] * L, "MISR enabled for every unload but the first");
      check(n_load == 1 && n_clear == 1 && n_cmp == 1, "one seed load, clear and compare");
      check(ctl.done && !ctl.busy && !ctl.test_mode && ctl.scan_op == SC_FUNC,
            "normal mode with done after the session");
      repeat (3) @(negedge clk);
      check(ctl.done, "done held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
