// tb_jitter_filter: self-checking test of the encoder jitter filter.
//
// Tenc is a strobe every TENC clocks. The input alternates between long
// levels (3*TENC + 6 clocks or more), which must reach the output, and
// short pulses of 1 .. TENC-1 clocks, which must never change the output.
module tb_jitter_filter;
  localparam int TENC = 4;
  logic clk = 0, rst = 1, tenc, din = 0, dout;
  int checks = 0, failures = 0, cyc = 0;
  logic level = 0;
  int changes;

  jitter_filter dut (.clk, .rst, .tenc, .din, .dout);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign tenc = (cyc % TENC) == TENC - 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (3 * TENC + 6) @(posedge clk);
    check(dout == 1'b0, "initial low");
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 1)) begin
        // long level: must pass
        din <= ~level;
        level = ~level;
        repeat (3 * TENC + 6 + $urandom_range(0, 20)) @(posedge clk);
        check(dout == level, "long level passed");
      end else begin
        // short pulse: must be rejected
        changes = 0;
        din <= ~level;
        repeat ($urandom_range(1, TENC - 1)) begin
          @(posedge clk);
          if (dout != level) changes++;
        end
        din <= level;
        repeat (3 * TENC + 6) begin
          @(posedge clk);
          if (dout != level) changes++;
        end
        check(changes == 0, "short pulse rejected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
