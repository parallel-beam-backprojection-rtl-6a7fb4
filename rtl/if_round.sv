// if_round - stage 3: interpolation factor rounding.
//
// The spatial address carries 15 fractional bits; the multiplier of the
// linear interpolation takes only IFW = 4. This unit looks at the top IFW+1
// fractional bits and rounds to nearest (adds the bit below the kept ones).
// A fraction of 31/32 or more would round up to 1.0, which does not fit the
// factor; it saturates to (2^IFW - 1)/2^IFW instead, so the factor always
// interpolates between the same two samples the integer part selected.
// Rounding to nearest, the 5-in/4-out width and the saturation follow the
// document. Purely combinational.
module if_round
  import bp_pkg::*;
#(
  parameter int W = IFW   // width of the rounded factor
) (
  input  logic [W:0]   frac_hi,  // top W+1 fractional address bits
  output logic [W-1:0] factor    // rounded interpolation factor
);

  logic [W:0] sum;

  always_comb begin
    sum = {1'b0, frac_hi[W:1]} + (W+1)'(frac_hi[0]);
    factor = sum[W] ? {W{1'b1}} : sum[W-1:0];
  end

endmodule
