// tb_control_structure: the control loop of one axis, end to end, closed
// through a simple motor model.
//
// Reduced sizes keep the run short: Ts = 512 clocks, Tenc = 4 clocks, sine
// period 2**18 clocks (512 samples), debounce 8 clocks, RS-232 at 5 Mbaud.
// The motor is a first-order velocity lag driven by the control signal,
// with a speed limit; its shaft angle drives the quadrature channels. Short
// jitter pulses (3 clocks, below one Tenc period) are added to channel A.
//
// Scenarios: position steps up and down, tracking a sine reference,
// velocity control, gains raised by push buttons, a step large enough to
// saturate the controller and the output register, On/Off, encoder reset.
// Checked throughout: the encoder count follows the shaft (within one count
// of lag), each velocity value is the difference of the last two positions,
// every RS-232 word is the feedback value of its sample, the two gates of a
// PWM leg are never on together, and the loop settles where it should. Each
// mechanism must have happened at least once.
module tb_control_structure;
  import fpga_rt_pkg::*;
  localparam int TS = 512;
  localparam int DIV = 10;

  logic clk = 0, rst = 1, on = 0, enc_reset = 0, enc_a, enc_b;
  logic vel_mode = 0, ref_sel = 1, key_up = 0, key_down = 0, pwm_en = 0;
  logic signed [15:0] ref_const = 0;
  gain_sel_e gain_sel = SEL_KP;
  logic signed [7:0] dac;
  logic [3:0] pwm;
  logic [15:0] pwm_carrier, position_ob;
  logic uart_tx, uart_busy, ts, tenc;
  logic signed [15:0] position, velocity, ctrl;
  logic [15:0] kp, ki, kd;

  control_structure #(
    .TS_LOG2(9), .TENC_LOG2(2), .SIN_LOG2(18), .DEB_LOG2(3), .BAUD(5_000_000)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s at %0t pos=%0d", what, $time, position); end
  endtask

  // ---------------- motor model ----------------
  real p = 0.0, v = 0.0;
  localparam real KT = 2.0e-5, TAU = 1000.0, VMAX = 0.04;
  logic [1:0] gray [4] = '{2'b00, 2'b01, 2'b11, 2'b10};   // {A,B}, counting up
  int ip, glitch_left = 0;
  logic a_m, b_m;
  // updated on the falling edge, so the design sees stable inputs
  always @(negedge clk) begin
    v = v + (KT * real'(ctrl) - v) / TAU;
    if (v > VMAX) v = VMAX;
    if (v < -VMAX) v = -VMAX;
    p = p + v;
    ip = int'($floor(p));
    {a_m, b_m} = gray[((ip % 4) + 4) % 4];
    if (glitch_left > 0) glitch_left--;
  end
  assign enc_a = a_m ^ (glitch_left > 0);
  assign enc_b = b_m;

  // ---------------- mechanism counters ----------------
  int n_glitch = 0, n_up = 0, n_down = 0, n_pid_sat = 0, n_dac_sat = 0, n_dead = 0;
  int n_vel_mode = 0, n_sine = 0, n_keys = 0, n_uart = 0, n_off = 0, n_enc_reset = 0;
  int n_ts = 0, pos_off = 0;   // pos_off: model offset after an encoder reset
  logic signed [15:0] pos_q, pos_at_treg, pos_prev_treg;
  bit have_prev = 0;

  // Jitter pulses are 3 clocks long and at least 6 Tenc periods apart: the
  // filter rejects single pulses shorter than one Tenc period, not bursts.
  int quiet = 0;
  always @(negedge clk) begin
    if (glitch_left > 0) quiet = 0; else quiet++;
    if ($urandom_range(0, 199) == 0 && quiet > 24 && !rst) begin glitch_left = 3; n_glitch++; end
  end

  always @(posedge clk) begin
    pos_q <= position;
    if (!rst) begin
      if (position == pos_q + 16'sd1) n_up++;
      if (position == pos_q - 16'sd1) n_down++;
      if (ctrl == 16'sh7fff || ctrl == 16'sh8000) n_pid_sat++;
      if (dac == 8'sh7f || dac == 8'sh80) n_dac_sat++;
      if (pwm_en && !pwm[0] && !pwm[1]) n_dead++;
      if (pwm[0] && pwm[1]) begin failures++; checks++; $display("FAIL PWM overlap"); end
      if (ts) n_ts++;
    end
  end

  // velocity estimator: at each treg the new velocity is position - previous
  always @(posedge clk) begin
    if (!rst && dut.treg) begin
      pos_prev_treg <= pos_at_treg;
      pos_at_treg   <= position;
      if (have_prev) begin
        #1;
        check(velocity == pos_at_treg - pos_prev_treg, "velocity = position difference");
      end
      have_prev = 1;
    end
  end

  // encoder count against the shaft, once per sample
  always @(posedge clk) begin
    if (!rst && ts && on && !enc_reset) begin
      int d;
      d = int'(position) - (ip - pos_off);
      check(d >= -1 && d <= 1, "encoder count follows shaft");
    end
  end

  // RS-232: receive every word and compare with the feedback of its sample
  logic signed [15:0] fb_at_ts [$];
  always @(posedge clk) if (!rst && ts && !uart_busy) fb_at_ts.push_back(vel_mode ? velocity : position);
  initial begin
    logic [7:0] hi, lo;
    logic [15:0] w;
    forever begin
      @(negedge uart_tx);
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); hi[i] = uart_tx; end
      repeat (DIV) @(posedge clk);
      @(negedge uart_tx);
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); lo[i] = uart_tx; end
      w = {hi, lo};
      if (fb_at_ts.size() > 0) begin
        check(w == fb_at_ts.pop_front(), "RS-232 word is the sample's feedback");
        n_uart++;
      end
    end
  end

  task automatic samples(input int n);
    repeat (n * TS) @(posedge clk);
  endtask

  task automatic press(input gain_sel_e s, input bit up_dir);
    gain_sel <= s;
    if (up_dir) key_up <= 1; else key_down <= 1;
    repeat (20) @(posedge clk);
    key_up <= 0; key_down <= 0;
    repeat (20) @(posedge clk);
    n_keys++;
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real rs;
  int t_on, ts_before;
  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    on <= 1; pwm_en <= 1;
    check(kp == 16'(10 << 8) && ki == 16'(5 << 8) && kd == 16'(10 << 8), "initial gains 10, 5, 10");
    // position step up
    ref_const <= 200;
    samples(150);
    check(position >= 196 && position <= 204, "position settles at +200");
    // position step down through zero
    ref_const <= -100;
    samples(150);
    check(position >= -104 && position <= -96, "position settles at -100");
    // sine reference
    ref_sel <= 0; n_sine++;
    samples(600);
    for (int i = 0; i < 100; i++) begin
      samples(2);
      check((int'(dut.reference) - int'(position)) <= 150 && (int'(dut.reference) - int'(position)) >= -150,
            "sine tracked");
    end
    // velocity loop, gains raised by the buttons
    for (int i = 0; i < 30; i++) press(SEL_KP, 1'b1);
    press(SEL_KD, 1'b0);
    check(kp == 16'(40 << 8) && kd == 16'(9 << 8), "gains changed by buttons");
    ref_sel <= 1; ref_const <= 4; vel_mode <= 1; n_vel_mode++;
    samples(100);
    check(velocity >= 1 && velocity <= 4, "velocity loop turns the shaft forward");
    // back to position, large step: controller and DAC saturate
    vel_mode <= 0; n_vel_mode++;
    ref_const <= 16'sd20000;
    samples(20);
    check(ctrl == 16'sh7fff && dac == 8'sh7f, "saturated on a large step");
    ref_const <= position;
    samples(200);
    // On/Off
    ts_before = n_ts;
    on <= 0;
    repeat (5 * TS) @(posedge clk);
    check(n_ts == ts_before, "no samples while off");
    n_off++;
    on <= 1;
    samples(5);
    check(n_ts > ts_before, "samples again after on");
    // encoder reset while the shaft is held still
    ref_const <= position;
    samples(100);
    enc_reset <= 1;
    repeat (10) @(posedge clk);
    pos_off = ip;
    enc_reset <= 0;
    @(posedge clk); #1;
    check(position == 0, "encoder reset clears the position");
    n_enc_reset++;
    ref_const <= 0;
    samples(20);
    // every mechanism must have happened
    check(n_glitch > 0,    "jitter pulses injected");
    check(n_up > 0,        "counted up");
    check(n_down > 0,      "counted down");
    check(n_pid_sat > 0,   "PID saturation");
    check(n_dac_sat > 0,   "output register saturation");
    check(n_dead > 0,      "PWM dead time");
    check(n_vel_mode > 0,  "position/velocity mode switch");
    check(n_sine > 0,      "sine reference");
    check(n_keys > 0,      "button presses");
    check(n_uart > 10,     "RS-232 words");
    check(n_off > 0,       "On/Off");
    check(n_enc_reset > 0, "encoder reset");
    $display("glitch=%0d up=%0d down=%0d pid_sat=%0d dac_sat=%0d dead=%0d vel_mode=%0d sine=%0d keys=%0d uart=%0d off=%0d enc_reset=%0d",
             n_glitch, n_up, n_down, n_pid_sat, n_dac_sat, n_dead, n_vel_mode, n_sine, n_keys, n_uart, n_off, n_enc_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
