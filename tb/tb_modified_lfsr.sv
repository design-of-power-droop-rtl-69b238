// tb_modified_lfsr: runs the low-power TPG through one full LFSR period and
// checks the raw state sequence, the weighted outputs against gate-level
// expectations, and that heavy inputs toggle less often than plain ones.
// Because consecutive LFSR states are shifted copies, a gate over stages
// i..i+k shares all but one stage with its value one step later, so over a
// full period: a plain bit toggles in 1/2 of the steps, a 2-input gate in
// 1/4 (shared stage must be 1 for AND / 0 for OR, the other two differ),
// a 3-input gate in 1/8, and output 15 (stages 15,0,1, which wrap past the
// feedback) in 1/2 * 2*(3/4)*(1/4) = 3/16.
module tb_modified_lfsr;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [15:0] state, weighted, ref_s, prev_w;
  int checks = 0, failures = 0;
  int toggles [16];

  modified_lfsr dut (.clk, .rst_n, .load, .en, .state, .weighted);

  always #5 clk = ~clk;

  function automatic logic [15:0] expect_w(logic [15:0] s);
    logic [15:0] w;
    w = s;
    w[0]  = s[0] & s[1];
    w[1]  = s[1] & s[2];
    w[8]  = s[8] & s[9] & s[10];
    w[9]  = s[9] | s[10];
    w[15] = s[15] | s[0] | s[1];
    return w;
  endfunction

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rate;
    foreach (toggles[i]) toggles[i] = 0;
    #12 rst_n = 1;
    ref_s = 16'hACE1;
    check(state == ref_s && weighted == expect_w(ref_s), "after reset");
    prev_w = weighted;
    en = 1;
    for (int i = 0; i < 65535; i++) begin
      @(posedge clk); #1;
      ref_s = {ref_s[14:0], ref_s[15] ^ ref_s[13] ^ ref_s[12] ^ ref_s[10]};
      check(state == ref_s, "state sequence");
      check(weighted == expect_w(state), "weighted pattern");
      for (int b = 0; b < 16; b++) if (weighted[b] != prev_w[b]) toggles[b]++;
      prev_w = weighted;
    end
    for (int b = 0; b < 16; b++) begin
      real want;
      rate = real'(toggles[b]) / 65535.0;
      case (b)
        0, 1, 9: want = 0.25;
        8:       want = 0.125;
        15:      want = 0.1875;
        default: want = 0.5;
      endcase
      check(rate > want - 0.005 && rate < want + 0.005,
            $sformatf("bit %0d toggle rate %f expected %f", b, rate, want));
    end
    check(toggles[8] < toggles[2] && toggles[0] < toggles[2], "heavy inputs toggle less");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
