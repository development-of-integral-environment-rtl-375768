// tb_output_register: the zero-order hold takes its input only on treg,
// saturates it to 8 signed bits, and holds it between strobes.
module tb_output_register;
  logic clk = 0, rst = 1, treg = 0;
  logic signed [15:0] din = 0;
  logic signed [7:0] dout;
  int checks = 0, failures = 0, ex = 0, sats = 0;

  output_register dut (.clk, .rst, .treg, .din, .dout);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s dout=%0d exp=%0d", what, dout, ex); end
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
    @(posedge clk); #1 check(dout == 0, "reset value");
    for (int i = 0; i < 3000; i++) begin
      din  <= (i % 2) ? 16'($signed($urandom_range(0, 400)) - 200) : 16'($urandom);
      treg <= 1;
      @(posedge clk);
      treg <= 0;
      ex = int'(din) > 127 ? 127 : (int'(din) < -128 ? -128 : int'(din));
      if (ex != int'(din)) sats++;
      @(posedge clk); #1 check(int'(dout) == ex, "sample on treg");
      din <= $urandom;
      repeat (4) @(posedge clk);
      #1 check(int'(dout) == ex, "hold between strobes");
    end
    check(sats > 0, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
