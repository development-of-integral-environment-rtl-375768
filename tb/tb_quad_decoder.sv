// tb_quad_decoder: self-checking test of the quadrature decoder FSM.
//
// The channels take a random walk along the Gray sequence 00,01,11,10
// ({A,B}), one step per strobe period or less often, with occasional
// illegal double changes. Each legal step must give exactly one count pulse
// with the right direction; an illegal one none. The net count is checked
// against the walk.
module tb_quad_decoder;
  logic clk = 0, rst = 1, t, a = 0, b = 0, count, up;
  int checks = 0, failures = 0, cyc = 0;
  int pulses, ups, pos_model = 0, pos_dut = 0, idx = 0;
  logic [1:0] gray [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  quad_decoder dut (.clk, .rst, .t, .a, .b, .count, .up);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign t = cyc[0];

  always_ff @(posedge clk) if (!rst && count) pos_dut <= pos_dut + (up ? 1 : -1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (kind == 0) idx = (idx + 2) % 4;            // illegal jump
      else if (kind < 6) idx = (idx + 1) % 4;        // up
      else idx = (idx + 3) % 4;                      // down
      {a, b} <= gray[idx];
      pulses = 0; ups = 0;
      repeat (4) begin
        @(posedge clk);
        if (count) begin pulses++; if (up) ups++; end
      end
      if (kind == 0) check(pulses == 0, "illegal step not counted");
      else begin
        check(pulses == 1, "one pulse per step");
        check((ups == 1) == (kind < 6), "direction");
        pos_model += (kind < 6) ? 1 : -1;
      end
    end
    check(pos_dut == pos_model, "net count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
