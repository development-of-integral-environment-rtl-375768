// tb_pid_param_entry: push-button gain entry.
//
// With a short debounce (8 clocks), presses on up/down must change only the
// selected gain by 1.0 (256 in Q8.8), bounces shorter than the debounce time
// must change nothing, and the gains must stop at 0 and at 0xFFFF.
module tb_pid_param_entry;
  import fpga_rt_pkg::*;
  logic clk = 0, rst = 1, up = 0, down = 0;
  gain_sel_e sel = SEL_KP;
  logic [15:0] kp, ki, kd;
  int checks = 0, failures = 0;
  int m [3];

  pid_param_entry #(.DEB_LOG2(3)) dut (.clk, .rst, .sel, .btn_up(up), .btn_down(down), .kp, .ki, .kd);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s kp=%0d ki=%0d kd=%0d exp %0d %0d %0d", what, kp, ki, kd, m[0], m[1], m[2]); end
  endtask

  task automatic press(input bit dir_up);
    // a few bounces, then a held press, then release with bounces
    repeat (2) begin
      if (dir_up) up <= 1; else down <= 1;
      repeat ($urandom_range(1, 4)) @(posedge clk);
      up <= 0; down <= 0;
      repeat ($urandom_range(1, 4)) @(posedge clk);
    end
    if (dir_up) up <= 1; else down <= 1;
    repeat (20) @(posedge clk);
    up <= 0; down <= 0;
    repeat (2) @(posedge clk);
    if (dir_up) up <= 1; else down <= 1;
    @(posedge clk);
    up <= 0; down <= 0;
    repeat (20) @(posedge clk);
  endtask

  function automatic bit same();
    return kp == 16'(m[0]) && ki == 16'(m[1]) && kd == 16'(m[2]);
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    bit u;
    m = '{10 * 256, 5 * 256, 10 * 256};
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1 check(same(), "initial gains");
    for (int i = 0; i < 600; i++) begin
      s = $urandom_range(0, 2);
      sel <= gain_sel_e'(s);
      u = (i < 100) ? 1'b0 : (i < 400 ? 1'b1 : 1'($urandom_range(0, 1)));
      @(posedge clk);
      press(u);
      if (u) m[s] = (m[s] + 256 > 65535) ? 65535 : m[s] + 256;
      else   m[s] = (m[s] < 256) ? 0 : m[s] - 256;
      #1 check(same(), u ? "up press" : "down press");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
