// tb_control_structure_full: the control structure at its default sizes
// (Ts = 2**16 clocks = 1.31 ms, Tenc = 64 clocks = 1.28 us, 115200 baud,
// 1.31 ms debounce), through four complete sample periods.
//
// The shaft is turned by 20 counts right after reset and then held. The
// reference is the constant 0, so the error is -20 counts. Checked: the
// strobe periods and phases, the Ts/2 constant, the encoder position and
// its offset-binary form, the velocity of each sample, the controller
// output of each sample against a model of the control law with the
// initial gains Kp = 10, Ki = 5, Kd = 10, the held output register value,
// the RS-232 word of a sample, the PWM on-time for the controller output,
// and a Kp button press taking effect.
module tb_control_structure_full;
  import fpga_rt_pkg::*;
  logic clk = 0, rst = 1, on = 0, enc_reset = 0, enc_a = 0, enc_b = 0;
  logic vel_mode = 0, ref_sel = 1, key_up = 0, key_down = 0, pwm_en = 0;
  logic signed [15:0] ref_const = 0;
  gain_sel_e gain_sel = SEL_KP;
  logic signed [7:0] dac;
  logic [3:0] pwm;
  logic [15:0] pwm_carrier, position_ob;
  logic uart_tx, uart_busy, ts, tenc;
  logic signed [15:0] position, velocity, ctrl;
  logic [15:0] kp, ki, kd;

  control_structure dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // model of the control law (same number formats as documented)
  longint integ = 0, ep = 0;
  function automatic longint pid_model(input longint ev, input longint kpv, input longint kiv, input longint kdv);
    longint sum, uu;
    integ = integ + kiv * 10995 * (ev + ep);
    sum = (kpv * ev + kdv * (ev - ep)) * (64'sd1 <<< 24) + integ;
    uu = sum >>> 32;
    if (uu > 32767) uu = 32767;
    if (uu < -32768) uu = -32768;
    ep = ev;
    return uu;
  endfunction

  int cyc = 0, last_ts = -1, last_tenc = -1, n_ts = 0, treg_prev = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && ts) begin
      if (last_ts >= 0) check(cyc - last_ts == 65536, "Ts = 2**16 clocks");
      check(treg_prev == cyc - 1, "Treg one clock before Ts");
      last_ts <= cyc; n_ts <= n_ts + 1;
    end
    if (!rst && dut.treg) treg_prev <= cyc;
    if (!rst && tenc) begin
      if (last_tenc >= 0) check(cyc - last_tenc == 64, "Tenc = 64 clocks");
      last_tenc <= cyc;
    end
  end

  initial begin
    #20_000_000;   // 20 ms
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] gray [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
  longint u_exp;
  int hi_cnt, thr;
  logic [15:0] word;

  task automatic wait_ts();
    do @(posedge clk); while (!ts);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    on <= 1; pwm_en <= 1;
    check(dut.ts_half == 24'd10995, "Ts/2 = 0.655 ms in Q0.24");
    // turn the shaft 20 counts forward, 400 clocks per count
    for (int i = 1; i <= 20; i++) begin
      {enc_a, enc_b} <= gray[i % 4];
      repeat (400) @(posedge clk);
    end
    check(position == 16'sd20, "position 20 counts");
    check(position_ob == 16'h8014, "offset-binary position");
    // sample 1: velocity 20, error -20
    wait_ts();
    #1;
    check(velocity == 16'sd20, "velocity of the first sample");
    @(posedge clk); #1;
    u_exp = pid_model(-20, 10 * 256, 5 * 256, 10 * 256);
    check(ctrl == 16'(u_exp), "controller output, sample 1");
    $display("sample 1: u=%0d expected %0d", ctrl, u_exp);
    // RS-232 word of this sample
    begin
      // the start bit began at the Ts edge, one clock ago
      logic [7:0] hi, lo;
      repeat (216) @(posedge clk);
      #1 check(uart_tx == 1'b0, "RS-232 start bit");
      for (int i = 0; i < 8; i++) begin repeat (434) @(posedge clk); #1 hi[i] = uart_tx; end
      repeat (2 * 434) @(posedge clk);
      #1 check(uart_tx == 1'b0, "RS-232 second start bit");
      for (int i = 0; i < 8; i++) begin repeat (434) @(posedge clk); #1 lo[i] = uart_tx; end
      word = {hi, lo};
      check(word == 16'd20, "RS-232 word is the position");
    end
    // PWM on-time of Out1 over one 100 kHz period
    repeat (1000) @(posedge clk);
    hi_cnt = 0;
    repeat (500) begin @(posedge clk); #1 hi_cnt += pwm[0]; end
    thr = int'((longint'(16'(u_exp) ^ 16'h8000) * 500 + 32768) >>> 16);
    if (hi_cnt != thr - 8) $display("hi=%0d thr=%0d", hi_cnt, thr);
    check(hi_cnt == thr - 8, "PWM Out1 on-time: threshold minus 1.5 % dead time");
    // sample 2: output register now holds sample 1's output
    wait_ts();
    #1;
    check(velocity == 16'sd0, "velocity of the second sample");
    check(int'(dac) == (u_exp < -128 ? -128 : (u_exp > 127 ? 127 : int'(u_exp))), "output register holds sample 1");
    @(posedge clk); #1;
    u_exp = pid_model(-20, 10 * 256, 5 * 256, 10 * 256);
    check(ctrl == 16'(u_exp), "controller output, sample 2");
    // Kp button: held through the debounce time
    gain_sel <= SEL_KP;
    key_up <= 1;
    repeat (70000) @(posedge clk);
    key_up <= 0;
    repeat (70000) @(posedge clk);
    check(kp == 16'(11 * 256), "Kp raised by one press");
    // next sample uses the new gain
    wait_ts();
    @(posedge clk); #1;
    u_exp = pid_model(-20, 11 * 256, 5 * 256, 10 * 256);
    check(ctrl == 16'(u_exp), "controller output with the new Kp");
    check(n_ts >= 4, "four sample periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
