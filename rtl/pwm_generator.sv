// pwm_generator: PWM generator for half-bridge and full-bridge converters.
//
// A carrier counter runs on the system clock. With MODULATION = sawtooth
// the carrier counts 0 .. P-1 (P = CLK_FREQ/FREQ_HZ clocks per PWM period);
// with the triangle-based patterns it counts up 0 .. P/2-1 and back down.
// The reference input is turned into offset binary (BUS_TYPE signed: most
// significant bit inverted; unsigned: as is), scaled to the carrier range
// and taken once per period, at the carrier's start. A leg's command is high
// while the carrier is below the threshold. Each leg drives a complementary
// gate pair with dead time (pwm_dead_time); the dead time is DEAD_X100
// hundredths of a percent of the PWM period, rounded to clocks.
//   sawtooth, triangle: leg A on Out1/Out2; Out3/Out4 stay off.
//   bipolar:  leg B is switched opposite to leg A (diagonal pairs).
//   unipolar: leg B is compared with the inverted reference.
// Cout is the carrier.
//
// Follows the document: the four patterns, the frequency choices 100, 50,
// 25, 12, 6 kHz (100 kHz for sawtooth only), dead times 0, 0.75, 1.5, 2.3,
// 3.2 % of the period or off, signed or unsigned reference, inputs En, In
// and outputs Out1..Out4, Cout. Own choices: how the four outputs are
// assigned to bridge switches, the threshold scaling, the once-per-period
// update, and En resetting the carrier. Defaults are the configuration
// shown for the block: 100 kHz sawtooth, 1.5 % dead time, signed.
//
// Interface: clk, rst (synchronous), en, din; outputs registered.
module pwm_generator
  import fpga_rt_pkg::*;
#(
  parameter pwm_mod_e    MODULATION = PWM_SAWTOOTH,
  parameter int unsigned FREQ_HZ    = 100_000,
  parameter int unsigned DEAD_X100  = 150,
  parameter bus_type_e   BUS_TYPE   = BUS_SIGNED,
  parameter int unsigned IN_W       = POS_W,
  parameter int unsigned CLK_FREQ   = CLK_HZ
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic [IN_W-1:0] din,
  output logic [3:0]      out,     // out[0] = Out1 ... out[3] = Out4
  output logic [15:0]     cout
);
  localparam int unsigned P     = CLK_FREQ / FREQ_HZ;
  localparam bit          SAW   = (MODULATION == PWM_SAWTOOTH);
  localparam int unsigned R     = SAW ? P : P / 2;        // carrier range
  localparam int unsigned DT    = (P * DEAD_X100 + 5000) / 10000;
  localparam int unsigned PROD_W = IN_W + 16;

  initial assert (SAW || FREQ_HZ <= 50_000)
    else $error("pwm_generator: 100 kHz is for the sawtooth carrier only");

  logic [15:0]       cnt, carrier, thr_a, thr_b;
  logic [IN_W-1:0]   u_ref, u_inv;
  logic [PROD_W-1:0] prod_a, prod_b;
  logic              cmd_a, cmd_b, leg_b_on;

  always_ff @(posedge clk) begin
    if (rst || !en) cnt <= '0;
    else            cnt <= (32'(cnt) == P - 1) ? '0 : cnt + 1'b1;
  end

  assign carrier = (SAW || 32'(cnt) < R) ? cnt : 16'(P - 1 - 32'(cnt));
  assign cout    = carrier;

  assign u_ref  = (BUS_TYPE == BUS_SIGNED) ? {~din[IN_W-1], din[IN_W-2:0]} : din;
  assign u_inv  = ~u_ref;
  assign prod_a = PROD_W'(u_ref) * PROD_W'(R) + PROD_W'(1 << (IN_W - 1));
  assign prod_b = PROD_W'(u_inv) * PROD_W'(R) + PROD_W'(1 << (IN_W - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      thr_a <= '0;
      thr_b <= '0;
    end else if (!en || 32'(cnt) == P - 1) begin
      thr_a <= 16'(prod_a >> IN_W);
      thr_b <= 16'(prod_b >> IN_W);
    end
  end

  always_comb begin
    cmd_a    = carrier < thr_a;
    leg_b_on = 1'b1;
    unique case (MODULATION)
      PWM_BIPOLAR:  cmd_b = !cmd_a;
      PWM_UNIPOLAR: cmd_b = carrier < thr_b;
      default: begin
        cmd_b    = 1'b0;
        leg_b_on = 1'b0;
      end
    endcase
  end

  pwm_dead_time #(.DT(DT)) u_leg_a (
    .clk, .rst, .en, .cmd(cmd_a), .hi(out[0]), .lo(out[1])
  );
  pwm_dead_time #(.DT(DT)) u_leg_b (
    .clk, .rst, .en(en && leg_b_on), .cmd(cmd_b), .hi(out[2]), .lo(out[3])
  );
endmodule
