// control_structure: position/velocity control loop of one robot axis.
//
// The loop, run on one 50 MHz clock:
//   clk_gen_sin    makes the strobes Ts, Treg, Tenc, the value Ts/2 and a
//                  sine reference;
//   encoder_interface  counts the edges of the motor encoder (position);
//   velocity_estimator differentiates the position once per sample;
//   error_discriminator  reference (sine or a constant) minus feedback
//                  (position or velocity, chosen by vel_mode);
//   pid_controller computes the control signal once per Ts;
//   output_register holds it on eight pins for a DAC (zero-order hold);
//   pwm_generator  turns the same control signal into gate signals for a
//                  power converter;
//   pid_param_entry sets Kp, Ki, Kd from push buttons;
//   rs232_tx       sends the feedback value once per sample period.
// The same structure serves position control (vel_mode = 0) and velocity
// control (vel_mode = 1); a PI velocity loop is a PID with Kd = 0.
//
// Follows the document's control structure (error block, PID, clock and
// sine generator, output register, encoder, velocity estimator, On/Off
// and encoder-reset switches). Own choices: the feedback and reference
// selectors as ports, the PWM generator and RS-232 block placed beside the
// output register on the same control signal, and the default sine
// amplitude of 500 counts (the +-500 encoder pulse range of the position
// experiments).
//
// Timing: Treg samples feedback and output one clock before Ts; the PID
// output of sample k reaches the DAC pins at sample k+1.
module control_structure
  import fpga_rt_pkg::*;
#(
  parameter int unsigned TS_LOG2   = 16,
  parameter int unsigned TENC_LOG2 = 6,
  parameter int unsigned SIN_LOG2  = 28,
  parameter int unsigned SIN_AMP   = 500,
  parameter int unsigned DEB_LOG2  = 16,
  parameter int unsigned BAUD      = 115_200
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    on,          // SW0: On/Off of the clock generator
  input  logic                    enc_reset,   // SW2: clears the encoder position
  input  logic                    enc_a,       // encoder channel A (E1)
  input  logic                    enc_b,       // encoder channel B (E2)
  input  logic                    vel_mode,    // 0: position loop, 1: velocity loop
  input  logic                    ref_sel,     // 0: sine reference, 1: ref_const
  input  logic signed [POS_W-1:0] ref_const,
  input  gain_sel_e               gain_sel,
  input  logic                    key_up,
  input  logic                    key_down,
  input  logic                    pwm_en,
  output logic signed [7:0]       dac,         // Output reg Out1..Out8
  output logic [3:0]              pwm,         // PWM Out1..Out4
  output logic [15:0]             pwm_carrier, // PWM Cout
  output logic                    uart_tx,
  output logic                    uart_busy,
  output logic signed [POS_W-1:0] position,
  output logic [POS_W-1:0]        position_ob, // encoder Out, offset binary
  output logic signed [POS_W-1:0] velocity,
  output logic signed [POS_W-1:0] ctrl,        // PIDout
  output logic [GAIN_W-1:0]       kp,
  output logic [GAIN_W-1:0]       ki,
  output logic [GAIN_W-1:0]       kd,
  output logic                    ts,
  output logic                    tenc
);
  logic                    treg;
  logic [TSH_W-1:0]        ts_half;
  logic signed [POS_W-1:0] sin_ref, reference, feedback, err;

  clk_gen_sin #(
    .TS_LOG2(TS_LOG2), .TENC_LOG2(TENC_LOG2), .SIN_LOG2(SIN_LOG2), .SIN_AMP(SIN_AMP)
  ) u_clkgen (
    .clk, .rst, .on, .ts, .treg, .tenc, .ts_half, .sin(sin_ref)
  );

  encoder_interface #(.WIDTH(POS_W)) u_enc (
    .clk, .rst, .reset(enc_reset), .tenc, .e1(enc_a), .e2(enc_b),
    .count(position), .out(position_ob)
  );

  velocity_estimator #(.WIDTH(POS_W)) u_vel (
    .clk, .rst, .treg, .din(position), .dout(velocity)
  );

  assign reference = ref_sel  ? ref_const : sin_ref;
  assign feedback  = vel_mode ? velocity  : position;

  error_discriminator #(.W(POS_W)) u_err (.ref_in(reference), .fb(feedback), .err);

  pid_param_entry #(.DEB_LOG2(DEB_LOG2)) u_par (
    .clk, .rst, .sel(gain_sel), .btn_up(key_up), .btn_down(key_down), .kp, .ki, .kd
  );

  pid_controller u_pid (
    .clk, .rst, .ts, .e(err), .kp, .ki, .kd, .ts_half, .u(ctrl)
  );

  output_register #(.IN_W(POS_W), .OUT_W(8)) u_out (
    .clk, .rst, .treg, .din(ctrl), .dout(dac)
  );

  pwm_generator u_pwm (
    .clk, .rst, .en(pwm_en), .din(ctrl), .out(pwm), .cout(pwm_carrier)
  );

  rs232_tx #(.BAUD(BAUD)) u_uart (
    .clk, .rst, .send(ts), .data(feedback), .tx(uart_tx), .busy(uart_busy)
  );
endmodule
