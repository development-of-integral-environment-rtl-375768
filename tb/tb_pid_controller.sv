// tb_pid_controller: self-checking test of the Tustin PID controller.
//
// A reference model of u = Kp*e + I + Kd*(e - e_prev),
// I += Ki*(Ts/2)*(e + e_prev) (integrator clamped to the output range,
// output floored and saturated) is run in 64-bit integers next to the block.
// Phase 1 is the open-loop step response: a constant error gives a jump
// (proportional and derivative parts) and then a straight ramp whose slope
// is Ki*Ts*e per sample. Phase 2 uses random gains and errors, which also
// drive the output and the integrator into saturation. The output must
// change exactly one clock after each ts strobe and hold between strobes.
module tb_pid_controller;
  logic clk = 0, rst = 1, ts = 0;
  logic signed [15:0] e = 0, u;
  logic [15:0] kp, ki, kd;
  logic [23:0] ts_half;
  int checks = 0, failures = 0, sat_hits = 0;
  longint integ = 0, ep = 0, exp_u, last_u;
  longint slope1, slope2;

  pid_controller dut (.clk, .rst, .ts, .e, .kp, .ki, .kd, .ts_half, .u);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s u=%0d exp=%0d", what, u, exp_u); end
  endtask

  function automatic longint model_step(input longint ev);
    longint p, d, sum, uu;
    longint imax = (64'sd1 <<< 47) - 1, imin = -(64'sd1 <<< 47);
    p = longint'(kp) * ev;
    d = longint'(kd) * (ev - ep);
    integ = integ + longint'(ki) * longint'(ts_half) * (ev + ep);
    if (integ > imax) integ = imax;
    if (integ < imin) integ = imin;
    sum = (p + d) * (64'sd1 <<< 24) + integ;
    uu = sum >>> 32;
    if (uu > 32767) uu = 32767;
    if (uu < -32768) uu = -32768;
    ep = ev;
    return uu;
  endfunction

  task automatic sample(input logic signed [15:0] ev);
    e <= ev;
    @(posedge clk);
    ts <= 1;
    last_u = u;
    @(posedge clk);
    ts <= 0;
    exp_u = model_step(ev);
    #1 check(u == 16'(exp_u), "output one clock after ts");
    if (exp_u == 32767 || exp_u == -32768) sat_hits++;
    e <= $urandom;
    repeat (3) @(posedge clk);
    #1 check(u == 16'(exp_u), "output held between strobes");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kp = 16'(2 << 8); ki = 16'(50 << 8); kd = 16'(3 << 8);
    ts_half = 24'd10995;                    // 0.655 ms, Ts = 1.31 ms
    repeat (3) @(posedge clk);
    rst <= 0;
    // Phase 1: open-loop unit-style step response (e = 100 counts)
    sample(0);
    sample(100);
    check(u == 16'(2 * 100 + 3 * 100 + ((longint'(ki) * 10995 * 100) >>> 32)), "step: jump");
    sample(100);
    slope1 = longint'(u);
    sample(100);
    slope2 = longint'(u) - slope1;
    sample(100);
    // slope per sample is Ki*Ts*e = 50 * 1.31e-3 * 100 = 6.55 counts
    check(slope2 >= 6 && slope2 <= 7, "step: ramp slope Ki*Ts*e");
    check(longint'(u) - slope1 >= 12 && longint'(u) - slope1 <= 14, "step: ramp is straight");
    // Phase 2: random gains and errors
    for (int i = 0; i < 3000; i++) begin
      if (i % 100 == 0) begin
        kp = $urandom; ki = $urandom; kd = $urandom;
        ts_half = 24'($urandom_range(0, 20000));
      end
      sample((i % 300 < 150) ? 16'($urandom) : 16'($signed($urandom_range(0, 64)) - 32));
    end
    check(sat_hits > 0, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
