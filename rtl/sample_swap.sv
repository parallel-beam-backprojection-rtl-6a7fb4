// sample_swap - stage 4: operand alignment for the interpolation subtractor.
//
// The even and odd projection RAMs deliver samples i and i+1 in an order that
// depends on the parity of i. The subtractor computes in1 - in2 and must see
// the higher-indexed sample i+1 on in1:
//     i even: in1 = odd RAM word,  in2 = even RAM word
//     i odd : in1 = even RAM word, in2 = odd RAM word
// As in the document. Purely combinational; the lane registers the result.
module sample_swap
  import bp_pkg::*;
#(
  parameter int W = SW
) (
  input  logic         idx_odd,
  input  logic [W-1:0] even_val,
  input  logic [W-1:0] odd_val,
  output logic [W-1:0] in1,   // sample i+1
  output logic [W-1:0] in2    // sample i
);

  always_comb begin
    in1 = idx_odd ? even_val : odd_val;
    in2 = idx_odd ? odd_val  : even_val;
  end

endmodule
