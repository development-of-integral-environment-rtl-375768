// pid_param_entry: sets the PID gains Kp, Ki, Kd from push buttons.
//
// A selector (board switches) chooses one of the three gains. Each debounced
// press of the up button adds STEP to the selected gain, each press of the
// down button subtracts STEP; the gains stop at 0 and at the largest value
// instead of wrapping. After reset the gains have their initial values, so
// a controller can be tuned on the running board without rebuilding it.
//
// Follows the document: gains entered by DE board buttons at run time.
// Own choices: one selector with up/down buttons, the step, the initial
// values (those of the position/velocity structure built on the board:
// Kp = 10, Ki = 5, Kd = 10) and the debouncing.
//
// Interface: clk, rst (synchronous), sel, btn_up, btn_down (raw levels,
// active high); kp, ki, kd are registered, unsigned Q8.8, updated
// 2**DEB_LOG2 + 3 clocks after a press begins.
module pid_param_entry
  import fpga_rt_pkg::*;
#(
  parameter logic [GAIN_W-1:0] KP_INIT  = GAIN_W'(10 << GAIN_FRAC),
  parameter logic [GAIN_W-1:0] KI_INIT  = GAIN_W'(5 << GAIN_FRAC),
  parameter logic [GAIN_W-1:0] KD_INIT  = GAIN_W'(10 << GAIN_FRAC),
  parameter logic [GAIN_W-1:0] STEP     = GAIN_W'(1 << GAIN_FRAC),
  parameter int unsigned       DEB_LOG2 = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  gain_sel_e         sel,
  input  logic              btn_up,
  input  logic              btn_down,
  output logic [GAIN_W-1:0] kp,
  output logic [GAIN_W-1:0] ki,
  output logic [GAIN_W-1:0] kd
);
  logic inc, dec;

  button_debounce #(.DEB_LOG2(DEB_LOG2)) u_up   (.clk, .rst, .btn(btn_up),   .press(inc));
  button_debounce #(.DEB_LOG2(DEB_LOG2)) u_down (.clk, .rst, .btn(btn_down), .press(dec));

  function automatic logic [GAIN_W-1:0] step_gain(input logic [GAIN_W-1:0] g,
                                                  input logic up, input logic down);
    logic [GAIN_W:0] s;
    if (up && !down) begin
      s = {1'b0, g} + {1'b0, STEP};
      return s[GAIN_W] ? '1 : s[GAIN_W-1:0];
    end else if (down && !up) begin
      return (g < STEP) ? '0 : g - STEP;
    end
    return g;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      kp <= KP_INIT;
      ki <= KI_INIT;
      kd <= KD_INIT;
    end else begin
      case (sel)
        SEL_KP:  kp <= step_gain(kp, inc, dec);
        SEL_KI:  ki <= step_gain(ki, inc, dec);
        SEL_KD:  kd <= step_gain(kd, inc, dec);
        default: ;
      endcase
    end
  end
endmodule
