// output_register: zero-order hold of the controller output.
//
// On each Treg strobe it takes the IN_W-bit signed input, saturates it to a
// signed OUT_W-bit number and holds it on the output pins until the next
// strobe, so the converter behind the pins sees one constant value per
// sample period.
//
// Follows the document: an output register acting as a zero-order hold,
// clocked by Treg, with eight output lines. Own choices: the saturation to
// eight bits, two's-complement coding on the pins and reset to zero.
//
// Interface: clk, rst (synchronous), treg, din; dout is registered, valid
// one clock after the strobe.
module output_register #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    treg,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  localparam logic signed [IN_W-1:0] MAXV = IN_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(1 << (OUT_W - 1));

  always_ff @(posedge clk) begin
    if (rst)                dout <= '0;
    else if (treg) begin
      if (din > MAXV)       dout <= MAXV[OUT_W-1:0];
      else if (din < MINV)  dout <= MINV[OUT_W-1:0];
      else                  dout <= din[OUT_W-1:0];
    end
  end
endmodule
