// tb_fault_coverage: small stuck-at fault simulation of the complete BIST.
//
// For each single stuck-at-0 and stuck-at-1 fault on the 16 multiplier
// product bits, the 16 accumulator next-state bits and the 16 primary
// inputs of the CUT (96 faults; input faults are forced at the input
// multiplexer), the testbench forces the fault, runs a 64-pattern session,
// removes the fault and records whether the session ended with fail high.
// A fault-free session before and after must pass, and so must a session
// with the forcing expressions applied but no bit stuck. It reports the fault
// coverage and requires every one of these faults to be detected, since
// each of them reaches a scan cell within 64 weighted patterns.
module tb_fault_coverage;
  import lbist_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] sel = 2'd1;
  logic [7:0] a_in = 0, b_in = 0;
  logic [15:0] acc_out, signature;
  logic busy, done, fail;
  logic [15:0] and_mask, or_mask;
  int checks = 0, failures = 0;

  lbist_top dut (.clk, .rst_n, .start, .sel, .a_in, .b_in, .acc_out,
                 .busy, .done, .fail, .signature);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic session(output logic f);
    int cycles;
    start = 1;
    @(negedge clk); start = 0;
    cycles = 0;
    while (!done && cycles < 2000) begin @(negedge clk); cycles++; end
    check(done, "session finished");
    f = fail;
  endtask

  initial begin
    logic f;
    int detected = 0, total = 0;
    #12 rst_n = 1;
    @(negedge clk);
    session(f);
    check(!f, "fault-free session passes");
    // the forcing expressions themselves must be transparent without a fault
    and_mask = 16'hFFFF; or_mask = 16'h0000;
    force dut.u_cut.acc_next = dut.u_cut.acc + ((dut.u_cut.prod & and_mask) | or_mask);
    session(f);
    release dut.u_cut.acc_next;
    check(!f, "transparent product-fault force passes");
    force dut.u_cut.acc_next = ((dut.u_cut.acc + dut.u_cut.prod) & and_mask) | or_mask;
    session(f);
    release dut.u_cut.acc_next;
    check(!f, "transparent next-state-fault force passes");
    force dut.u_imux.sel = ((dut.u_imux.test_mode ? dut.u_imux.test_in : dut.u_imux.normal_in)
                            & and_mask) | or_mask;
    session(f);
    release dut.u_imux.sel;
    check(!f, "transparent input-fault force passes");
    for (int site = 0; site < 3; site++)
      for (int b = 0; b < 16; b++)
        for (int v = 0; v < 2; v++) begin
          and_mask = (v == 0) ? ~(16'd1 << b) : 16'hFFFF;
          or_mask  = (v == 1) ?  (16'd1 << b) : 16'h0000;
          // a product-bit fault is applied where the product is used
          if (site == 0) force dut.u_cut.acc_next = dut.u_cut.acc + ((dut.u_cut.prod & and_mask) | or_mask);
          else if (site == 1) force dut.u_cut.acc_next = ((dut.u_cut.acc + dut.u_cut.prod) & and_mask) | or_mask;
          else force dut.u_imux.sel = ((dut.u_imux.test_mode ? dut.u_imux.test_in
                                        : dut.u_imux.normal_in) & and_mask) | or_mask;
          session(f);
          release dut.u_cut.acc_next;
          release dut.u_imux.sel;
          total++;
          if (f) detected++;
          else $display("undetected: %s bit %0d stuck-at-%0d", site == 0 ? "product" : site == 1 ? "acc_next" : "primary input", b, v);
        end
    session(f);
    check(!f, "fault-free session passes after the faults are removed");
    $display("fault coverage: %0d of %0d faults detected (%0.1f%%)",
             detected, total, 100.0 * detected / total);
    check(detected == total, "every injected fault detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
