// fixed_requant: accumulator-to-output conversion with optional ReLU.
//
// Takes an ACC_W-bit signed partial sum held at product scale (the scale of
// a full-precision input x weight product) and returns a W-bit fixed-point
// value in the layer's output format. `shift` is the signed distance between
// the two scales (positive: shift right, negative: shift left); the low W
// bits of the shifted sum are kept, which truncates toward minus infinity
// and wraps on overflow, matching the multiply of the fixed-point model.
// With `relu` set a negative sum gives zero (VGG-16 follows every
// convolution with a ReLU). Purely combinational.
module fixed_requant #(
  parameter int W = 16,
  parameter int ACC_W = 32,
  parameter int SW = 7
) (
  input  logic signed [ACC_W-1:0] acc,
  input  logic signed [SW-1:0]    shift,
  input  logic                    relu,
  output logic signed [W-1:0]     q
);
  logic signed [ACC_W-1:0] moved;

  always_comb begin
    if (shift >= 0) moved = acc >>> shift;
    else            moved = acc <<< (-shift);
    if (relu && acc < 0) q = '0;
    else                 q = moved[W-1:0];
  end
endmodule
