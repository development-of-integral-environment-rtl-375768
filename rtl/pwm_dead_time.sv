// pwm_dead_time: complementary gate pair with dead time for one bridge leg.
//
// From one switching command it makes the high-side gate (follows cmd) and
// the low-side gate (follows not cmd). After every change of cmd both gates
// stay off for DT clocks before the new one turns on, so the two switches of
// the leg are never on together. With DT = 0 the pair is cmd and its
// complement. While en is low both gates are off.
//
// This is the dead-time insertion of the PWM generator; the counter method
// is this design's own.
//
// Interface: clk, rst (synchronous), en, cmd; hi and lo are registered.
module pwm_dead_time #(
  parameter int unsigned DT = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic cmd,
  output logic hi,
  output logic lo
);
  localparam int unsigned CW = (DT < 2) ? 1 : $clog2(DT + 1);

  logic          cmd_q;
  logic [CW-1:0] since;   // clocks since cmd last changed, saturating at DT
  logic          settled;

  assign settled = (cmd == cmd_q) && (32'(since) + 1 >= DT);

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      cmd_q <= cmd;
      since <= '0;
      hi    <= 1'b0;
      lo    <= 1'b0;
    end else begin
      cmd_q <= cmd;
      if (cmd != cmd_q)          since <= '0;
      else if (32'(since) < DT)  since <= since + 1'b1;
      hi <= cmd  && (DT == 0 || settled);
      lo <= !cmd && (DT == 0 || settled);
    end
  end
endmodule
