// tb_lbist_top: end-to-end test of the logic BIST at its default size.
//   1. normal mode: random operands, acc_out must accumulate a*b;
//   2. a BIST session for every test length: the signature must equal the
//      value from an independent bit-level model, fail must stay low, the
//      session must take 1 + P*6 + 4 + 1 cycles, and the CUT must return to
//      normal mode afterwards;
//   3. a stuck-at-0 on accumulator next-state bit 3, forced in the CUT: the
//      session must end with fail high (and the model's faulty signature);
//   4. counts each mechanism: scan shift with held CUT outputs, update,
//      capture, MISR compaction, weighted heavy-input patterns, pass, fail,
//      return to normal mode. One that never happened counts as a failure.
// It also compares the toggles on the CUT's logic inputs during shift
// (zero, because the scan cells hold) with the scan-chain toggles.
module tb_lbist_top;
  import lbist_pkg::*;
  localparam int PATS [4] = '{16, 64, 256, 1024};
  localparam logic [15:0] GOOD [4] = '{16'h92B0, 16'h38FD, 16'h2DAD, 16'h3A99};
  localparam logic [15:0] BAD16 = 16'hD2E1;   // stuck-at-0 on bit 3, 16 patterns

  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] sel = 0;
  logic [7:0] a_in = 0, b_in = 0;
  logic [15:0] acc_out, signature;
  logic busy, done, fail;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_shift_held = 0, n_update = 0, n_capture = 0, n_misr = 0;
  int n_pass = 0, n_fail = 0, n_normal = 0, n_heavy_ones = 0, n_heavy_pats = 0;
  int cut_in_toggles_shift = 0;

  lbist_top dut (.clk, .rst_n, .start, .sel, .a_in, .b_in, .acc_out,
                 .busy, .done, .fail, .signature);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observe the internals on every cycle
  logic [15:0] prev_acc, prev_pi;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.ctl.scan_op == SC_SHIFT) begin
        if (acc_out == prev_acc && dut.pi == prev_pi) n_shift_held++;
        cut_in_toggles_shift += $countones(acc_out ^ prev_acc) + $countones(dut.pi ^ prev_pi);
      end
      if (dut.ctl.scan_op == SC_UPDATE) begin
        n_update++;
        n_heavy_pats++;
        // heavy input 8 has probability 1/8 of being one
        if (dut.tpg_weighted[8]) n_heavy_ones++;
      end
      if (dut.ctl.scan_op == SC_CAPTURE) n_capture++;
      if (dut.ctl.misr_en) n_misr++;
    end
    prev_acc <= acc_out;
    prev_pi  <= dut.pi;
  end

  task automatic normal_mode(int n);
    logic [15:0] m;
    // operands go through the input register, so acc changes one cycle later
    @(negedge clk); a_in = 0; b_in = 0;
    @(negedge clk); @(negedge clk);
    m = acc_out;
    for (int i = 0; i < n; i++) begin
      a_in = 8'($urandom); b_in = 8'($urandom);
      @(negedge clk);  // input register loads
      m = m + 16'(a_in) * 16'(b_in);
      a_in = 0; b_in = 0;
      @(negedge clk);  // accumulator adds the product
      check(acc_out == m, $sformatf("normal mode acc=%h want %h", acc_out, m));
    end
    n_normal++;
  endtask

  task automatic session(int s, output logic [15:0] sig, output logic f, output int cycles);
    sel = 2'(s); start = 1;
    @(negedge clk); start = 0;
    cycles = 0;
    while (!done && cycles < 20000) begin @(negedge clk); cycles++; end
    sig = signature; f = fail;
    if (f) n_fail++; else n_pass++;
  endtask

  initial begin
    logic [15:0] sig;
    logic f;
    int cycles;
    #12 rst_n = 1;
    normal_mode(50);
    for (int s = 0; s < 4; s++) begin
      session(s, sig, f, cycles);
      check(sig == GOOD[s], $sformatf("sel %0d signature %h want %h", s, sig, GOOD[s]));
      check(!f, $sformatf("sel %0d: fault-free session must pass", s));
      check(cycles == 1 + PATS[s] * 6 + 4 + 1, $sformatf("sel %0d: %0d cycles", s, cycles));
      normal_mode(10);
    end
    // inject a stuck-at-0 fault into the CUT logic
    force dut.u_cut.acc_next[3] = 1'b0;
    session(0, sig, f, cycles);
    release dut.u_cut.acc_next[3];
    check(f, "faulty CUT must fail");
    check(sig == BAD16, $sformatf("faulty signature %h want %h", sig, BAD16));
    normal_mode(10);
    // fault-free again after the fault is removed
    session(0, sig, f, cycles);
    check(!f && sig == GOOD[0], "passes again without the fault");

    $display("mechanisms: held-shift=%0d update=%0d capture=%0d misr=%0d pass=%0d fail=%0d normal=%0d",
             n_shift_held, n_update, n_capture, n_misr, n_pass, n_fail, n_normal);
    $display("heavy input 8 ones: %0d of %0d patterns; CUT input toggles during shift: %0d",
             n_heavy_ones, n_heavy_pats, cut_in_toggles_shift);
    check(n_shift_held > 0, "scan shift with held outputs happened");
    check(n_update > 0 && n_capture > 0, "update and capture happened");
    check(n_misr > 0, "MISR compaction happened");
    check(n_pass > 0 && n_fail > 0, "both pass and fail outcomes happened");
    check(n_normal > 0, "normal mode happened");
    check(cut_in_toggles_shift == 0, "CUT logic inputs quiet during shift");
    check(n_heavy_ones > 0 && n_heavy_ones * 4 < n_heavy_pats, "heavy input biased towards 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
