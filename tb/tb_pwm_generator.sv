// tb_pwm_generator: four configurations of the PWM generator side by side.
//
//   A: sawtooth, 100 kHz (500 clocks), dead time 1.5 % (8 clocks), signed
//   B: triangle,  50 kHz (1000 clocks), 0.75 % (8 clocks), signed
//   C: bipolar,   25 kHz (2000 clocks), 3.2 % (64 clocks), unsigned
//   D: unipolar,  50 kHz (1000 clocks), 0 %, signed
// For random constant references the on-time of each output over one PWM
// period is compared with the value worked out from the threshold
// thr = round(u * R / 65536), u the reference in offset binary, R the
// carrier range: sawtooth on-time thr - DT, triangle on-time 2*thr - DT
// (low side: period minus that minus 2*DT). The carrier period is measured,
// the two gates of a leg must never be on together, each turn-on must
// follow the other gate's turn-off by at least DT clocks, and En low must
// switch everything off.
module tb_pwm_generator;
  import fpga_rt_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [15:0] din = 0;
  logic [3:0] oa, ob, oc, od;
  logic [15:0] ca, cb, cc, cd;
  int checks = 0, failures = 0;

  pwm_generator dut_a (.clk, .rst, .en, .din, .out(oa), .cout(ca));
  pwm_generator #(.MODULATION(PWM_TRIANGLE), .FREQ_HZ(50_000), .DEAD_X100(75))
    dut_b (.clk, .rst, .en, .din, .out(ob), .cout(cb));
  pwm_generator #(.MODULATION(PWM_BIPOLAR), .FREQ_HZ(25_000), .DEAD_X100(320), .BUS_TYPE(BUS_UNSIGNED))
    dut_c (.clk, .rst, .en, .din, .out(oc), .cout(cc));
  pwm_generator #(.MODULATION(PWM_UNIPOLAR), .FREQ_HZ(50_000), .DEAD_X100(0))
    dut_d (.clk, .rst, .en, .din, .out(od), .cout(cd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s din=%h", what, din); end
  endtask

  // overlap and dead-time monitors, per leg of each instance
  logic [15:0] outs;
  int off_since [8];
  logic [15:0] outs_q;
  int overlap = 0, dt_viol = 0;
  localparam int DTS [4] = '{8, 8, 64, 0};
  assign outs = {od, oc, ob, oa};
  always_ff @(posedge clk) begin
    outs_q <= outs;
    for (int g = 0; g < 8; g++) begin
      // gate pair g: bits 2g (high) and 2g+1 (low)
      if (outs[2*g] && outs[2*g+1]) overlap <= overlap + 1;
      if (!en) off_since[g] <= 1000;
      else if (outs[2*g] || outs[2*g+1]) off_since[g] <= 0;
      else off_since[g] <= off_since[g] + 1;
      // turn-on of either gate after the other was on: both must have been off DT clocks
      if ((outs[2*g] && !outs_q[2*g]) || (outs[2*g+1] && !outs_q[2*g+1]))
        if (off_since[g] < DTS[g/2] && off_since[g] < 1000 && DTS[g/2] > 0) dt_viol <= dt_viol + 1;
    end
  end

  function automatic int thr(input logic [15:0] u, input int r);
    return int'((longint'(u) * r + 32768) >>> 16);
  endfunction

  // On-times of the high and low gate over one period when the command is
  // high for c of the p clocks and each turn-on is delayed by dt clocks.
  function automatic int hi_time(input int c, input int p, input int dt);
    if (c == 0) return 0;
    if (c == p) return p;
    return (c - dt < 0) ? 0 : c - dt;
  endfunction
  function automatic int lo_time(input int c, input int p, input int dt);
    return hi_time(p - c, p, dt);
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int on_a [4], on_b [4], on_c [4], on_d [4];
    int max_ca, max_cb, ta, tb2, tc, td, tdb, wraps_a;
    logic [15:0] us, uu, ui;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    #1 check(oa == 0 && ob == 0 && oc == 0 && od == 0, "disabled: all off");
    en <= 1;
    for (int k = 0; k < 40; k++) begin
      din <= (k < 4) ? 16'(k == 0 ? 16'h8000 : (k == 1 ? 16'h7fff : (k == 2 ? 16'h0000 : 16'hffff))) : 16'($urandom);
      // let two periods of the slowest carrier pass so all thresholds are taken
      repeat (2 * 2000 + 10) @(posedge clk);
      on_a = '{0, 0, 0, 0}; on_b = '{0, 0, 0, 0}; on_c = '{0, 0, 0, 0}; on_d = '{0, 0, 0, 0};
      max_ca = 0; max_cb = 0; wraps_a = 0;
      for (int n = 0; n < 2000; n++) begin
        @(posedge clk); #1;
        for (int j = 0; j < 4; j++) begin
          if (n < 500)  on_a[j] += oa[j];
          if (n < 1000) begin on_b[j] += ob[j]; on_d[j] += od[j]; end
          on_c[j] += oc[j];
        end
        if (n < 500 && int'(ca) > max_ca) max_ca = ca;
        if (n < 1000 && int'(cb) > max_cb) max_cb = cb;
        if (n < 500 && ca == 0) wraps_a++;
      end
      us = din ^ 16'h8000;     // signed reference in offset binary
      uu = din;                // unsigned reference
      ta  = thr(us, 500);
      tb2 = thr(us, 500);
      tc  = thr(uu, 1000);
      td  = thr(us, 500);
      tdb = thr(~us, 500);
      if (k < 6) $display("din=%h ta=%0d tb=%0d tc=%0d td=%0d tdb=%0d a=%p b=%p c=%p d=%p", din, ta, tb2, tc, td, tdb, on_a, on_b, on_c, on_d);
      check(max_ca == 499 && wraps_a == 1, "sawtooth carrier 0..499, period 500");
      check(max_cb == 499, "triangle carrier peak 499");
      check(on_a[0] == hi_time(ta, 500, 8) && on_a[1] == lo_time(ta, 500, 8), "A sawtooth on-times");
      check(on_a[2] == 0 && on_a[3] == 0, "A second leg off");
      check(on_b[0] == hi_time(2 * tb2, 1000, 8) && on_b[1] == lo_time(2 * tb2, 1000, 8), "B triangle on-times");
      check(on_c[0] == hi_time(2 * tc, 2000, 64) && on_c[1] == lo_time(2 * tc, 2000, 64), "C leg A on-times");
      check(on_c[2] == on_c[1] && on_c[3] == on_c[0], "C bipolar diagonal");
      check(on_d[0] == 2 * td && on_d[1] == 1000 - 2 * td, "D leg A on-times");
      check(on_d[2] == 2 * tdb && on_d[3] == 1000 - 2 * tdb, "D unipolar leg B on-times");
    end
    check(overlap == 0, "gates of a leg never on together");
    check(dt_viol == 0, "dead time kept");
    en <= 0;
    repeat (3) @(posedge clk);
    #1 check(oa == 0 && ob == 0 && oc == 0 && od == 0 && ca == 0, "En low: all off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
