// updown_counter: the encoder position counter.
//
// A WIDTH-bit binary counter that adds one on each enable pulse when up is
// high and subtracts one when it is low. It wraps modulo 2**WIDTH, so read as
// two's complement it runs through zero in both directions. The clear input
// sets it to zero.
//
// Follows the encoder design: a 16-bit up/down counter with clock (here a
// clock enable), clear and up/down inputs. Synchronous clear is this
// design's choice.
//
// Interface: clk, clr (synchronous), en, up; q is registered, one clock after
// the enable.
module updown_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             en,
  input  logic             up,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (clr)     q <= '0;
    else if (en) q <= up ? q + 1'b1 : q - 1'b1;
  end
endmodule
