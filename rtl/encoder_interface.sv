// encoder_interface: incremental encoder interface (position in counts).
//
// Channels A and B of the encoder (inputs e1, e2) each pass a jitter filter
// clocked by the Tenc strobe. A quadrature decoder turns every edge of the
// filtered channels into a count pulse with a direction, and a 16-bit
// up/down counter accumulates them, so one encoder line gives four counts.
// Two readings of the counter are given: count, the counter itself as a
// two's-complement position, and out, the bus-builder output with the most
// significant bit inverted (offset binary), as drawn in the encoder design.
// Differences of either reading are equal modulo 2**16.
//
// Follows the encoder design: filters, Quad_decoder, Counter, bus builder
// with the inverter on bit 15, and one Reset input clearing decoder and
// counter but not the filters. Own choices: a separate power-on reset rst
// for the filters (it also clears decoder and counter); all parts run on
// the system clock with Tenc as an enable. While Reset is held the decoder
// follows the filtered channels, so releasing it gives no count; after a
// power-on reset alone the position may be off by one count until the next
// Reset, because the filters start from 0.
//
// Interface: clk, rst (power-on, synchronous), reset (the block's Reset,
// synchronous), tenc (strobe), e1, e2 (raw A, B). Timing: a clean edge reaches count 3 clocks after the
// second Tenc strobe that samples it.
module encoder_interface #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             reset,
  input  logic             tenc,
  input  logic             e1,
  input  logic             e2,
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] out
);
  logic filt_a, filt_b, cnt_pulse, cnt_up, clr;

  assign clr = rst || reset;

  jitter_filter u_filt_a (.clk, .rst, .tenc, .din(e1), .dout(filt_a));
  jitter_filter u_filt_b (.clk, .rst, .tenc, .din(e2), .dout(filt_b));

  quad_decoder u_dec (
    .clk, .rst(clr), .t(tenc), .a(filt_a), .b(filt_b), .count(cnt_pulse), .up(cnt_up)
  );

  updown_counter #(.WIDTH(WIDTH)) u_cnt (
    .clk, .clr(clr), .en(cnt_pulse), .up(cnt_up), .q(count)
  );

  assign out = {~count[WIDTH-1], count[WIDTH-2:0]};
endmodule
