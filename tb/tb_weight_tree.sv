// tb_weight_tree: applies all 2^16 LFSR states to the AND/OR gate tree and
// checks every output bit against the gate each weight class calls for,
// and that the fraction of ones equals the intended probability exactly
// (1/4, 1/8, 3/4, 7/8 on the heavy inputs, 1/2 elsewhere).
module tb_weight_tree;
  logic [15:0] q, pi;
  int checks = 0, failures = 0;
  int ones [16];

  weight_tree dut (.q, .pi);

  function automatic logic expect_bit(logic [15:0] s, int i);
    logic x0, x1, x2;
    x0 = s[i]; x1 = s[(i + 1) % 16]; x2 = s[(i + 2) % 16];
    case (i)
      0, 1:    return x0 & x1;
      8:       return x0 & x1 & x2;
      9:       return x0 | x1;
      15:      return x0 | x1 | x2;
      default: return x0;
    endcase
  endfunction

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want [16];
    foreach (ones[i]) ones[i] = 0;
    for (int v = 0; v < 65536; v++) begin
      q = 16'(v); #1;
      for (int i = 0; i < 16; i++) begin
        if (pi[i]) ones[i]++;
        if (pi[i] != expect_bit(q, i)) begin
          failures++;
          if (failures < 10) $display("FAIL: q=%h bit %0d", q, i);
        end
      end
      checks++;
    end
    foreach (want[i]) want[i] = 32768;
    want[0] = 16384; want[1] = 16384; want[8] = 8192; want[9] = 49152; want[15] = 57344;
    for (int i = 0; i < 16; i++)
      check(ones[i] == want[i], $sformatf("bit %0d ones %0d expected %0d", i, ones[i], want[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
