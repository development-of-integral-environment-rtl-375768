// clk_gen_sin: sample-time strobes and a sine test signal.
//
// One free-running counter on the 50 MHz system clock makes all the sample
// times of a control structure by power-of-two division:
//   ts    one-cycle strobe every 2**TS_LOG2 clocks (the controller sample
//         time Ts; 2**9 .. 2**26 clocks is 10.24 us .. 1.34 s),
//   treg  the same period, one clock before ts: the feedback and the output
//         register sample here, so the controller sees fresh values at ts,
//   tenc  strobe every 2**TENC_LOG2 clocks for the encoder filters
//         (2**3 .. 2**15 clocks is 0.16 us .. 655 us).
// ts_half is the constant Ts/2 in seconds, unsigned Q0.24, for the Tustin
// integrator of the PID controller.
// The sine output has a period of 2**SIN_LOG2 clocks: 2**26, 2**27, 2**28,
// 2**29 give 745, 373, 186 and 93 mHz. The top 10 bits of the counter
// address a 256-entry quarter-wave table (entry i is
// round(32767*sin(pi/2*(i+0.5)/256)), read from rtl/sine_quarter.hex
// relative to the directory the tools run in), mirrored for the other
// quarters and scaled by SIN_AMP/32768.
//
// Follows the document: power-of-two division of the 50 MHz clock, the
// ranges of Ts and Tenc, the four sine frequencies, the On/Off input and the
// outputs TS, Ts/2, Treg, Tenc, Sin. Own choices: strobes instead of clocks,
// the phase of treg, the table method and size, the amplitude scaling. The
// CLK output of the original block is the system clock itself and is not
// regenerated here.
//
// Interface: clk, rst (synchronous), on (On/Off: while low the counter is
// held at zero, no strobes are given and sin is 0). sin is registered, two
// clocks behind the counter.
module clk_gen_sin
  import fpga_rt_pkg::*;
#(
  parameter int unsigned TS_LOG2   = 16,     // Ts = 2**16 / 50 MHz = 1.31 ms
  parameter int unsigned TENC_LOG2 = 6,      // Tenc = 1.28 us
  parameter int unsigned SIN_LOG2  = 28,     // 186 mHz
  parameter int unsigned SIN_AMP   = 32767,
  parameter int unsigned CLK_FREQ  = CLK_HZ
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   on,
  output logic                   ts,
  output logic                   treg,
  output logic                   tenc,
  output logic [TSH_W-1:0]       ts_half,
  output logic signed [POS_W-1:0] sin
);
  localparam int unsigned CW = (TS_LOG2 > TENC_LOG2)
                               ? ((TS_LOG2 > SIN_LOG2) ? TS_LOG2 : SIN_LOG2)
                               : ((TENC_LOG2 > SIN_LOG2) ? TENC_LOG2 : SIN_LOG2);
  localparam longint unsigned CF      = 64'(CLK_FREQ);
  localparam longint unsigned TSH_VAL = ((64'd1 << (TS_LOG2 - 1 + TSH_FRAC)) + CF / 2) / CF;

  logic [CW-1:0] cnt;
  logic [15:0]   rom [256];
  logic [9:0]    phase;
  logic [7:0]    addr;
  logic [15:0]   mag;
  logic          neg_q;   // second half of the period: negative
  logic          on_q;
  logic signed [16:0] val;
  logic signed [33:0] scaled;

  initial $readmemh("rtl/sine_quarter.hex", rom);

  always_ff @(posedge clk) begin
    if (rst || !on) cnt <= '0;
    else            cnt <= cnt + 1'b1;
  end

  assign ts      = on && (cnt[TS_LOG2-1:0] == {TS_LOG2{1'b1}});
  assign treg    = on && (cnt[TS_LOG2-1:0] == {{(TS_LOG2-1){1'b1}}, 1'b0});
  assign tenc    = on && (cnt[TENC_LOG2-1:0] == {TENC_LOG2{1'b1}});
  assign ts_half = TSH_W'(TSH_VAL);

  assign phase = cnt[SIN_LOG2-1 -: 10];
  assign addr  = phase[8] ? ~phase[7:0] : phase[7:0];

  // Stage 1: table read. Stage 2: sign, scale, register.
  always_ff @(posedge clk) begin
    mag    <= rom[addr];
    neg_q  <= phase[9];
    on_q   <= on && !rst;
  end

  assign val    = neg_q ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  assign scaled = val * $signed({1'b0, 16'(SIN_AMP)});

  always_ff @(posedge clk) begin
    if (rst || !on_q) sin <= '0;
    else              sin <= POS_W'(scaled >>> 15);
  end
endmodule
