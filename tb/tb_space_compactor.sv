// tb_space_compactor: all 16 scan-out combinations; z[0] must be the XOR of
// chains 0 and 2, z[1] of chains 1 and 3.
module tb_space_compactor;
  logic [3:0] so;
  logic [1:0] z;
  int checks = 0, failures = 0;

  space_compactor dut (.so, .z);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      so = 4'(v); #1;
      checks++;
      if (z !== {so[1] ^ so[3], so[0] ^ so[2]}) begin
        failures++;
        $display("FAIL: so=%b z=%b", so, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
