// jitter_filter: removes short pulses ("jitter") from one encoder channel.
//
// The raw input is first brought into the system clock domain by two
// flip-flops. It is then sampled twice more on the Tenc strobe (DFF and DFF1
// of the encoder design). A set/reset flip-flop makes the output: it is set
// when the input and both Tenc samples are 1, cleared when all three are 0,
// and holds its value otherwise. A pulse shorter than one Tenc period can
// never be seen by both samples and is always rejected; a level that stays
// for more than two Tenc periods always reaches the output.
//
// Follows the encoder design: two Tenc-clocked flip-flops, an all-ones term
// setting and an all-zeros term clearing an S/R flip-flop. Own choices: the
// two-flop synchronizer, Tenc as a clock enable, the S/R flip-flop updated
// synchronously on the system clock, and reset to 0.
//
// Interface: clk, rst (synchronous, active high), tenc (one-cycle strobe),
// din (raw channel), dout (filtered). Latency: 2 clocks of synchronizer plus
// the two Tenc samples.
module jitter_filter (
  input  logic clk,
  input  logic rst,
  input  logic tenc,
  input  logic din,
  output logic dout
);
  logic [1:0] sync;
  logic       s0, s1;   // the two Tenc-sampled copies
  logic       set_c, clr_c;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync <= '0;
      s0   <= 1'b0;
      s1   <= 1'b0;
    end else begin
      sync <= {sync[0], din};
      if (tenc) begin
        s0 <= sync[1];
        s1 <= s0;
      end
    end
  end

  assign set_c = sync[1] & s0 & s1;
  assign clr_c = ~(sync[1] | s0 | s1);

  always_ff @(posedge clk) begin
    if (rst)        dout <= 1'b0;
    else if (set_c) dout <= 1'b1;
    else if (clr_c) dout <= 1'b0;
  end
endmodule
