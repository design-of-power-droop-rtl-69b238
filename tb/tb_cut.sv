// tb_cut: drives the scanned multiply-accumulate CUT with normal operation,
// scan shift/update/capture sequences and random operands, and compares
// acc and the scan-outs with a reference of the accumulator and the four
// 4-cell chains (bit k*4+c = chain k, cell c).
module tb_cut;
  import lbist_pkg::*;
  logic clk = 0, rst_n = 0;
  scan_op_e op = SC_HOLD;
  logic [7:0] a = 0, b = 0;
  logic [3:0] si = 0, so;
  logic [15:0] acc;
  logic [15:0] m_sh, m_q;
  int checks = 0, failures = 0;

  cut dut (.clk, .rst_n, .op, .a, .b, .si, .so, .acc);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(scan_op_e o);
    logic [15:0] nxt;
    @(negedge clk);
    op = o; a = 8'($urandom); b = 8'($urandom); si = 4'($urandom);
    for (int k = 0; k < 4; k++) check(so[k] == m_sh[k*4+3], "scan-out");
    nxt = m_q + 16'(a) * 16'(b);
    @(posedge clk); #1;
    unique case (o)
      SC_FUNC:    begin m_sh = nxt; m_q = nxt; end
      SC_SHIFT:   for (int k = 0; k < 4; k++) m_sh[k*4 +: 4] = {m_sh[k*4 +: 3], si[k]};
      SC_UPDATE:  m_q = m_sh;
      SC_CAPTURE: m_sh = nxt;
      default:    ;
    endcase
    check(acc == m_q, $sformatf("acc=%h want %h", acc, m_q));
  endtask

  initial begin
    m_sh = '0; m_q = '0;
    #12 rst_n = 1;
    repeat (200) cycle(SC_FUNC);
    for (int p = 0; p < 500; p++) begin
      repeat (4) cycle(SC_SHIFT);
      cycle(SC_UPDATE);
      cycle(SC_CAPTURE);
    end
    repeat (2000) cycle(scan_op_e'($urandom_range(0, 4)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
