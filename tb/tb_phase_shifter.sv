// tb_phase_shifter: random LFSR states; each scan-in bit must be the XOR of
// its three stages (0,5,10 / 1,7,13 / 2,9,14 / 3,6,11).
module tb_phase_shifter;
  logic [15:0] q;
  logic [3:0]  si, want;
  int checks = 0, failures = 0;

  phase_shifter dut (.q, .si);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      q = 16'($urandom); #1;
      want[0] = q[0] ^ q[5]  ^ q[10];
      want[1] = q[1] ^ q[7]  ^ q[13];
      want[2] = q[2] ^ q[9]  ^ q[14];
      want[3] = q[3] ^ q[6]  ^ q[11];
      checks++;
      if (si !== want) begin
        failures++;
        if (failures < 10) $display("FAIL: q=%h si=%b want=%b", q, si, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
