// tb_scan_chain: random sequences of scan operations on a 4-cell chain,
// compared cycle by cycle with a reference model of the shift and hold
// flops. Also counts that the held outputs never change during a shift.
module tb_scan_chain;
  import lbist_pkg::*;
  logic clk = 0, rst_n = 0, si = 0, so;
  scan_op_e op = SC_HOLD;
  logic [3:0] d = '0, q;
  logic [3:0] m_sh, m_q;
  int checks = 0, failures = 0, shifts = 0;

  scan_chain dut (.clk, .rst_n, .op, .si, .d, .q, .so);

  always #5 clk = ~clk;

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
    logic [3:0] q_before;
    m_sh = '0; m_q = '0;
    #12 rst_n = 1;
    check(q == 0 && so == 0, "reset");
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      op = scan_op_e'($urandom_range(0, 4));
      si = 1'($urandom);
      d  = 4'($urandom);
      q_before = q;
      check(so == m_sh[3], "so is the last shift flop");
      @(posedge clk); #1;
      unique case (op)
        SC_FUNC:    begin m_sh = d; m_q = d; end
        SC_SHIFT:   m_sh = {m_sh[2:0], si};
        SC_UPDATE:  m_q = m_sh;
        SC_CAPTURE: m_sh = d;
        default:    ;
      endcase
      check(q == m_q, $sformatf("op %s: q=%b want %b", op.name(), q, m_q));
      if (op == SC_SHIFT) begin
        shifts++;
        check(q == q_before, "outputs held during shift");
      end
    end
    check(shifts > 100, "shift exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
