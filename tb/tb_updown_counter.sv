// tb_updown_counter: self-checking test of the 16-bit up/down counter,
// compared every clock with a model, including wrap-around in both
// directions and clear.
module tb_updown_counter;
  logic clk = 0, clr = 1, en = 0, up = 0;
  logic [15:0] q;
  int checks = 0, failures = 0, cyc = 0;
  int model = 0;
  bit wrapped_up = 0, wrapped_down = 0;

  updown_counter dut (.clk, .clr, .en, .up, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); clr <= 0;
    @(posedge clk);
    for (cyc = 0; cyc < 300000; cyc++) begin
      // long runs in one direction so the counter wraps both ways
      if (cyc % 90000 == 0) up <= (cyc / 90000) % 2 == 0;
      en  <= $urandom_range(0, 3) != 0;
      clr <= (cyc == 225000);
      @(posedge clk);
      #1;
      if (clr) model = 0;
      else if (en) begin
        if (up) begin if (model == 65535) wrapped_up = 1; model = (model + 1) % 65536; end
        else begin if (model == 0) wrapped_down = 1; model = (model + 65535) % 65536; end
      end
      checks++;
      if (q != 16'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL q=%0d model=%0d", q, model);
      end
    end
    checks++; if (!(wrapped_up && wrapped_down)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
