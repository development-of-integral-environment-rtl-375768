// velocity_estimator: velocity from position by a first difference.
//
// On every Treg strobe it stores the position input and outputs the
// difference to the position stored at the previous strobe,
// Out(z) = In(z)(1 - z^-1), i.e. the velocity in counts per sample period.
// The subtraction is modulo 2**WIDTH, so the result is right across a wrap
// of the position counter as long as the speed is below half the range per
// sample.
//
// Follows the document's difference equation. Own choices: reset of both
// registers to zero and a registered output.
//
// Interface: clk, rst (synchronous), treg (strobe), din (position); dout is
// updated one clock after the strobe and held until the next one.
module velocity_estimator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    treg,
  input  logic signed [WIDTH-1:0] din,
  output logic signed [WIDTH-1:0] dout
);
  logic signed [WIDTH-1:0] prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev <= '0;
      dout <= '0;
    end else if (treg) begin
      prev <= din;
      dout <= din - prev;
    end
  end
endmodule
