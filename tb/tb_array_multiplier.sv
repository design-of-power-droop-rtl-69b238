// tb_array_multiplier: all 65536 operand pairs of the 8x8 array multiplier
// against the product computed in the testbench.
module tb_array_multiplier;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  array_multiplier dut (.a, .b, .p);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d*%0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
