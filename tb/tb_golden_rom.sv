// tb_golden_rom: reads every address and compares with the signatures an
// independent bit-level model of the default design gives for 16, 64, 256
// and 1024 patterns.
module tb_golden_rom;
  logic [1:0]  addr;
  logic [15:0] data;
  logic [15:0] want [4] = '{16'h92B0, 16'h38FD, 16'h2DAD, 16'h3A99};
  int checks = 0, failures = 0;

  golden_rom dut (.addr, .data);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      addr = 2'(i); #1;
      checks++;
      if (data !== want[i]) begin
        failures++;
        $display("FAIL: addr %0d data %h want %h", i, data, want[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
