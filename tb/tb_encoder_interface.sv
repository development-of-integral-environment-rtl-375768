// tb_encoder_interface: the whole encoder path (filters, decoder, counter).
//
// Part 1 repeats the check of the block's design verification: 13 regular
// edges of E1 and E2 (E2 leading, i.e. counting up) with three short jitter
// pulses on E1 must leave the counter at exactly 13.
// Part 2 is a random walk of the encoder shaft, forwards and backwards,
// with jitter pulses shorter than one Tenc period on both channels between
// the edges; after every step the count must equal the walk's position
// (four counts per line), and out must be the count with bit 15 inverted.
// The walk crosses zero, so the counter also wraps. Reset must clear the count, and releasing it must not count.
module tb_encoder_interface;
  localparam int TENC = 8;
  localparam int D    = 8 * TENC;   // clocks between encoder edges
  logic clk = 0, rst = 1, reset = 0, tenc, e1 = 0, e2 = 0;
  logic [15:0] count, out;
  int checks = 0, failures = 0, cyc = 0, pos = 0, idx = 0, glitches = 0;
  logic [1:0] gray [4] = '{2'b00, 2'b01, 2'b11, 2'b10};   // {E1,E2}, counting up

  encoder_interface dut (.clk, .rst, .reset, .tenc, .e1, .e2, .count, .out);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign tenc = (cyc % TENC) == TENC - 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s count=%0d pos=%0d", what, $signed(count), pos); end
  endtask

  task automatic glitch(input bit on_e1);
    int len;
    len = $urandom_range(1, TENC - 1);
    if (on_e1) e1 <= ~e1; else e2 <= ~e2;
    repeat (len) @(posedge clk);
    if (on_e1) e1 <= ~e1; else e2 <= ~e2;
    glitches++;
  endtask

  task automatic step(input bit fwd, input bit with_glitch);
    idx = fwd ? (idx + 1) % 4 : (idx + 3) % 4;
    pos += fwd ? 1 : -1;
    {e1, e2} <= gray[idx];
    repeat (D / 2) @(posedge clk);
    if (with_glitch) glitch($urandom_range(0, 1));
    repeat (D / 2) @(posedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (D) @(posedge clk);
    #1 check(count == 0 && out == 16'h8000, "cleared after reset");
    // Part 1: 13 edges, jitter on E1 after the 8th, 9th and 10th edge
    for (int i = 1; i <= 13; i++) step(1'b1, 1'b0);
    #1 check(count == 16'd13, "13 edges counted");
    pos = 0; idx = 0;
    // back to 00 while Reset is held: no count on release
    reset <= 1; {e1, e2} <= 2'b00; repeat (D) @(posedge clk); reset <= 0;
    @(posedge clk);
    #1 check(count == 0, "Reset clears");
    for (int i = 1; i <= 13; i++) begin
      idx = (idx + 1) % 4; pos++;
      {e1, e2} <= gray[idx];
      repeat (D / 2) @(posedge clk);
      if (i >= 8 && i <= 10) glitch(1'b1);
      repeat (D / 2) @(posedge clk);
    end
    #1 check(count == 16'd13, "13 edges with three jitter pulses on E1 counted as 13");
    // Part 2: random walk with jitter, through zero
    for (int i = 0; i < 1500; i++) begin
      step((i / 300) % 2 == 0 ? ($urandom_range(0, 9) < 7) : ($urandom_range(0, 9) < 3),
           $urandom_range(0, 2) == 0);
      #1 check($signed(count) == 16'(pos), "position after step");
      check(out == (count ^ 16'h8000), "offset-binary output");
    end
    check(glitches > 100, "jitter injected");
    // Part 3: Reset clears the position
    reset <= 1; @(posedge clk); reset <= 0; @(posedge clk);
    #1 check(count == 0, "Reset clears again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
