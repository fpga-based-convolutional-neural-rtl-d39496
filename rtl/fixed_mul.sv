// fixed_mul: dynamic fixed-point multiplier.
//
// Multiplies two W-bit signed fixed-point numbers whose binary points sit at
// different places (int_a and int_b integer digits after the sign bit) and
// returns both the full 2W-bit product and the product re-expressed with
// int_r integer digits. The full product carries (W-1-int_a)+(W-1-int_b)
// fraction bits; the result is that product shifted arithmetically by
// (W-1)+int_r-int_a-int_b and cut to its low W bits, so out-of-range values
// wrap and low bits are truncated, as in the reference fixed-point model of
// the accelerator. Example with W=16: 3.625 (int 3) x 3 (int 2) into int 4
// gives 10.875.
//
// Purely combinational. The processing elements use `prod`; `result` is the
// stand-alone multiply of the fixed-point tool set. The full-width product
// and truncating cut follow the reference model; W is a parameter of this
// implementation.
module fixed_mul #(
  parameter int W = 16,
  parameter int DW = 4
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  input  logic        [DW-1:0]  int_a,
  input  logic        [DW-1:0]  int_b,
  input  logic        [DW-1:0]  int_r,
  output logic signed [2*W-1:0] prod,
  output logic signed [W-1:0]   result
);
  int shift;
  logic signed [2*W-1:0] moved;

  always_comb begin
    prod  = a * b;
    shift = (W - 1) + int'(int_r) - int'(int_a) - int'(int_b);
    if (shift >= 0) moved = prod >>> shift;
    else            moved = prod <<< (-shift);
    result = moved[W-1:0];
  end
endmodule
