// pid_controller: discrete PID controller with a Tustin integrator.
//
// Once per sample period (strobe ts) it computes
//   u[k] = Kp*e[k] + I[k] + Kd*(e[k] - e[k-1])
//   I[k] = I[k-1] + Ki*(Ts/2)*(e[k] + e[k-1])
// which is the z-domain law Kp + Ki*(Ts/2)*(z+1)/(z-1) + Kd*(z-1)/z: a
// trapezoidal (Tustin) integral and a backward-difference derivative. The
// derivative term is Kd times the plain difference, with no division by Ts.
//
// Number formats: error e and output u are signed integers of E_W and U_W
// bits; Kp, Ki, Kd are unsigned Q(GAIN_W-GAIN_FRAC).GAIN_FRAC; ts_half (the
// value Ts/2 in seconds) is unsigned Q0.TSH_FRAC. The integrator is kept with
// GAIN_FRAC+TSH_FRAC fractional bits and clamped to the output range (anti
// wind-up). The output is the sum rounded towards minus infinity and
// saturated to U_W bits.
//
// Follows the document: the control law, the Tustin integral, the inputs
// In, Ts, Ts/2, Kp, Ki, Kd and the output PIDout, one output per Ts.
// Own choices: all number formats, the clamp, the saturation and reset to
// zero.
//
// Interface: clk, rst (synchronous), ts (sample strobe), e, kp, ki, kd,
// ts_half; u changes one clock after each ts strobe and is held between.
module pid_controller
  import fpga_rt_pkg::*;
#(
  parameter int unsigned E_W       = POS_W,
  parameter int unsigned U_W       = POS_W,
  parameter int unsigned K_W       = GAIN_W,
  parameter int unsigned K_FRAC    = GAIN_FRAC,
  parameter int unsigned T_W       = TSH_W,
  parameter int unsigned T_FRAC    = TSH_FRAC
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ts,
  input  logic signed [E_W-1:0] e,
  input  logic        [K_W-1:0] kp,
  input  logic        [K_W-1:0] ki,
  input  logic        [K_W-1:0] kd,
  input  logic        [T_W-1:0] ts_half,
  output logic signed [U_W-1:0] u
);
  localparam int unsigned FR    = K_FRAC + T_FRAC;  // fractional bits of I and of the sum
  localparam int unsigned ACC_W = 64;

  localparam logic signed [ACC_W-1:0] I_MAX = (ACC_W'(1) <<< (U_W - 1 + FR)) - 1;
  localparam logic signed [ACC_W-1:0] I_MIN = -(ACC_W'(1) <<< (U_W - 1 + FR));
  localparam logic signed [U_W-1:0]   U_MAX = {1'b0, {(U_W-1){1'b1}}};
  localparam logic signed [U_W-1:0]   U_MIN = {1'b1, {(U_W-1){1'b0}}};

  logic signed [E_W-1:0]   e_prev;
  logic signed [ACC_W-1:0] integ;

  logic signed [E_W:0]     e_sum, e_dif;
  logic signed [ACC_W-1:0] p_term, d_term, i_inc, i_new, sum, u_full;

  always_comb begin
    e_sum  = {e[E_W-1], e} + {e_prev[E_W-1], e_prev};
    e_dif  = {e[E_W-1], e} - {e_prev[E_W-1], e_prev};
    p_term = ACC_W'($signed({1'b0, kp})) * ACC_W'(e);
    d_term = ACC_W'($signed({1'b0, kd})) * ACC_W'(e_dif);
    i_inc  = ACC_W'($signed({1'b0, ki})) * ACC_W'($signed({1'b0, ts_half})) * ACC_W'(e_sum);
    i_new  = integ + i_inc;
    if (i_new > I_MAX)      i_new = I_MAX;
    else if (i_new < I_MIN) i_new = I_MIN;
    sum    = ((p_term + d_term) <<< T_FRAC) + i_new;
    u_full = sum >>> FR;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      e_prev <= '0;
      integ  <= '0;
      u      <= '0;
    end else if (ts) begin
      e_prev <= e;
      integ  <= i_new;
      if (u_full > ACC_W'(U_MAX))      u <= U_MAX;
      else if (u_full < ACC_W'(U_MIN)) u <= U_MIN;
      else                             u <= u_full[U_W-1:0];
    end
  end
endmodule
