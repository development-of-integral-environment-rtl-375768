// tb_clk_gen_sin: checks the strobes, the Ts/2 value and the sine output.
//
// A reduced instance (Ts = 32 clocks, Tenc = 8 clocks, sine period 4096
// clocks) is run: ts must come every 32 clocks, treg exactly one clock
// before ts, tenc every 8 clocks; the sine must match 32767*sin(2*pi*n/4096)
// (n = clocks since On, output two clocks behind) within one table step;
// with On low there are no strobes and the sine is 0. The Ts/2 value of an
// instance at the default Ts = 2**16 clocks (1.31 ms) must be 0.655 ms in
// Q0.24, i.e. 10995, and of the reduced one round(16 / 50e6 * 2**24) = 5.
module tb_clk_gen_sin;
  logic clk = 0, rst = 1, on = 0;
  logic ts, treg, tenc, ts_d, ts2, treg2, tenc2;
  logic [23:0] ts_half, ts_half2;
  logic signed [15:0] sin, sin2;
  int checks = 0, failures = 0, n = 0, last_ts = -1, last_tenc = -1, n_ts = 0;
  real expv, err, maxerr = 0;

  clk_gen_sin #(.TS_LOG2(5), .TENC_LOG2(3), .SIN_LOG2(12)) dut (
    .clk, .rst, .on, .ts, .treg, .tenc, .ts_half, .sin);
  clk_gen_sin dut_full (
    .clk, .rst, .on(1'b0), .ts(ts2), .treg(treg2), .tenc(tenc2), .ts_half(ts_half2), .sin(sin2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s n=%0d", what, n); end
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
    repeat (50) @(posedge clk);
    #1 check(!ts && !treg && !tenc && sin == 0, "off: idle");
    check(ts_half2 == 24'd10995, "Ts/2 at default Ts");
    check(ts_half == 24'd5, "Ts/2 at reduced Ts");
    on <= 1;
    @(posedge clk);   // counter starts counting from 0 at this edge
    for (n = 0; n < 3 * 4096; n++) begin
      #1;
      if (ts) begin
        if (last_ts >= 0) check(n - last_ts == 32, "ts period");
        check(ts_d, "treg one clock before ts");
        last_ts = n; n_ts++;
      end
      if (tenc) begin
        if (last_tenc >= 0) check(n - last_tenc == 8, "tenc period");
        last_tenc = n;
      end
      ts_d = treg;
      if (n >= 2) begin
        expv = 32767.0 * $sin(2.0 * 3.14159265358979 * real'(n - 2) / 4096.0);
        err = real'(sin) - expv;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        check(err <= 210.0, "sine value");
      end
      @(posedge clk);
    end
    check(n_ts == 3 * 4096 / 32, "ts count");
    $display("max sine error %0.1f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
