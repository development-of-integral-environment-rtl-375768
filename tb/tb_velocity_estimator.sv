// tb_velocity_estimator: self-checking test of Out = In(1 - z^-1).
// Random positions, including jumps across the 16-bit wrap, are strobed in
// on treg; the output must be the modulo-2**16 difference to the previous
// sample, one clock after the strobe, and hold between strobes.
module tb_velocity_estimator;
  logic clk = 0, rst = 1, treg = 0;
  logic signed [15:0] din = 0, dout, prev = 0, expect_v;
  int checks = 0, failures = 0;

  velocity_estimator dut (.clk, .rst, .treg, .din, .dout);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s dout=%0d exp=%0d", what, dout, expect_v); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      din  <= (i % 50 == 0) ? 16'sh7ff0 + 16'($urandom_range(0, 31)) : prev + 16'($signed($urandom_range(0, 400)) - 200);
      treg <= 1;
      @(posedge clk);
      treg <= 0;
      expect_v = din - prev;
      prev = din;
      @(posedge clk); #1;
      check(dout == expect_v, "difference one clock after treg");
      din <= $urandom;
      repeat (3) @(posedge clk);
      #1 check(dout == expect_v, "held between strobes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
