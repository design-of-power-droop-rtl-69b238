// tb_input_mux: random selects, loads and data; pi must take the selected
// input on a load edge and keep its value otherwise.
module tb_input_mux;
  logic clk = 0, rst_n = 0, test_mode = 0, load = 0;
  logic [15:0] normal_in = 0, test_in = 0, pi, m_pi;
  int checks = 0, failures = 0;

  input_mux dut (.clk, .rst_n, .test_mode, .load, .normal_in, .test_in, .pi);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_pi = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      test_mode = 1'($urandom); load = 1'($urandom);
      normal_in = 16'($urandom); test_in = 16'($urandom);
      @(posedge clk); #1;
      if (load) m_pi = test_mode ? test_in : normal_in;
      checks++;
      if (pi !== m_pi) begin
        failures++;
        if (failures < 10) $display("FAIL: pi=%h want %h", pi, m_pi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
