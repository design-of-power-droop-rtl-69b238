// tb_misr: feeds random 2-bit responses into the MISR with random enable
// and occasional clear, comparing with a reference built from the
// polynomial x^16+x^14+x^13+x^11+1; also checks that a single flipped
// input bit changes the final signature.
module tb_misr;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [1:0] d = 0;
  logic [15:0] sig, m_sig;
  int checks = 0, failures = 0;

  misr dut (.clk, .rst_n, .clear, .en, .d, .sig);

  always #5 clk = ~clk;

  function automatic logic [15:0] step(logic [15:0] s, logic [1:0] x);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]} ^ {14'b0, x};
  endfunction

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] stream [200];
    logic [15:0] s1, s2;
    m_sig = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 99) == 0);
      en = 1'($urandom); d = 2'($urandom);
      @(posedge clk); #1;
      if (clear) m_sig = '0; else if (en) m_sig = step(m_sig, d);
      check(sig == m_sig, $sformatf("sig=%h want %h", sig, m_sig));
    end
    // aliasing check: one flipped bit in a 200-cycle stream
    foreach (stream[i]) stream[i] = 2'($urandom);
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); clear = 1; en = 0;
      @(negedge clk); clear = 0; en = 1;
      for (int i = 0; i < 200; i++) begin
        d = (pass == 1 && i == 77) ? stream[i] ^ 2'b01 : stream[i];
        @(negedge clk);
      end
      en = 0;
      if (pass == 0) s1 = sig; else s2 = sig;
    end
    check(s1 != s2, "single-bit error changes the signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
