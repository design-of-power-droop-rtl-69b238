// tb_prpg_lfsr: checks the conventional LFSR against a reference written
// from the polynomial x^16+x^14+x^13+x^11+1, its reset/load/enable
// behaviour, and that it has the maximal period 2^16-1.
module tb_prpg_lfsr;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [15:0] q, ref_q;
  int checks = 0, failures = 0;

  prpg_lfsr dut (.clk, .rst_n, .load, .en, .q);

  always #5 clk = ~clk;

  function automatic logic [15:0] step(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    #12 rst_n = 1;
    check(q == 16'hACE1, "reset value is the seed");
    // hold when not enabled
    repeat (3) @(posedge clk);
    #1 check(q == 16'hACE1, "holds with en=0");
    // compare 1000 steps with the reference
    ref_q = 16'hACE1;
    en = 1;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk); #1;
      ref_q = step(ref_q);
      check(q == ref_q, $sformatf("step %0d: got %h expected %h", i, q, ref_q));
    end
    // load restores the seed
    load = 1; @(posedge clk); #1 load = 0;
    check(q == 16'hACE1, "load restores seed");
    // period: first return to the seed after 65535 steps
    period = 0;
    do begin @(posedge clk); #1; period++; end while (q != 16'hACE1 && period < 70000);
    check(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
