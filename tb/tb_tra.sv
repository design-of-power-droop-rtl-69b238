// tb_tra: matching and mismatching signatures, clear, and that the result
// holds while check is low.
module tb_tra;
  logic clk = 0, rst_n = 0, clear = 0, check_i = 0;
  logic [15:0] sig = 0, golden = 0;
  logic valid, fail;
  int checks = 0, failures = 0;

  tra dut (.clk, .rst_n, .clear, .check(check_i), .sig, .golden, .valid, .fail);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    check(!valid && !fail, "reset");
    for (int i = 0; i < 500; i++) begin
      logic same;
      @(negedge clk);
      clear = 1; @(negedge clk); clear = 0;
      check(!valid && !fail, "cleared");
      golden = 16'($urandom);
      same = 1'($urandom);
      sig = same ? golden : golden ^ (16'd1 << $urandom_range(0, 15));
      check_i = 1; @(negedge clk); check_i = 0;
      check(valid && fail == !same, $sformatf("compare same=%0d fail=%0d", same, fail));
      sig = ~sig;
      @(negedge clk);
      check(valid && fail == !same, "result held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
