// fpga_rt_pkg: types and constants shared by the motor-control blocks.
//
// The blocks run from one 50 MHz system clock. Slower sample clocks of the
// control structure (Ts, Treg, Tenc) are one-cycle clock-enable strobes made
// by clk_gen_sin, not separate clocks. Positions and velocities are 16-bit
// two's-complement encoder counts; PID gains are unsigned Q8.8 numbers; the
// value Ts/2 used by the Tustin integrator is unsigned Q0.24 seconds.
package fpga_rt_pkg;

  // System clock frequency of the DE board.
  localparam int unsigned CLK_HZ = 50_000_000;

  // Word widths used across the control structure.
  localparam int unsigned POS_W      = 16;  // encoder position / velocity / control signal
  localparam int unsigned GAIN_W     = 16;  // Kp, Ki, Kd
  localparam int unsigned GAIN_FRAC  = 8;   // fractional bits of a gain
  localparam int unsigned TSH_W      = 24;  // Ts/2 in seconds
  localparam int unsigned TSH_FRAC   = 24;  // fractional bits of Ts/2

  // PWM modulation patterns of the PWM generator.
  typedef enum logic [1:0] {
    PWM_SAWTOOTH = 2'd0,  // one leg, sawtooth carrier
    PWM_TRIANGLE = 2'd1,  // one leg, triangle carrier
    PWM_BIPOLAR  = 2'd2,  // full bridge, diagonals switched together
    PWM_UNIPOLAR = 2'd3   // full bridge, each leg against its own reference
  } pwm_mod_e;

  // How the PWM reference input is coded.
  typedef enum logic {
    BUS_SIGNED   = 1'b0,
    BUS_UNSIGNED = 1'b1
  } bus_type_e;

  // Which gain a push-button press changes.
  typedef enum logic [1:0] {
    SEL_KP = 2'd0,
    SEL_KI = 2'd1,
    SEL_KD = 2'd2
  } gain_sel_e;

endpackage
