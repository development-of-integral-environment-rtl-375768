// error_discriminator: control error of the loop.
//
// Computes the error reference - feedback in one more bit and saturates it
// to W bits, so a large step cannot wrap round and reverse the controller.
//
// Follows the document: the error block in front of the PID controller.
// The saturation is this design's choice.
//
// Interface: combinational; ref_in, fb, err are signed W-bit.
module error_discriminator #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] ref_in,
  input  logic signed [W-1:0] fb,
  output logic signed [W-1:0] err
);
  logic signed [W:0] diff;

  assign diff = {ref_in[W-1], ref_in} - {fb[W-1], fb};

  always_comb begin
    if (diff[W] != diff[W-1]) err = diff[W] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
    else                      err = diff[W-1:0];
  end
endmodule
