// lin_interp - stages 5 and 6: linear interpolation of two projection samples.
//
// Computes   contrib = (in1 - in2) * IF + in2 * 2^IFW
// which is 2^IFW times the interpolated projection value; the scale factor is
// common to every pixel and is kept (no bits are discarded). Stage 5 holds the
// subtractor (W+1 bits signed) and the multiplier (W+1+IFW bits signed) and
// registers the product together with in2. The adder belongs to stage 6 and is
// combinational from those registers; its output (CW = W+IFW+2 bits signed)
// feeds the adder tree. Operation split and widths follow the document's
// datapath figure (10, 14, 13, 15 bits for 9-bit samples).
//
// Timing: inputs are sampled on en; contrib is valid in the following cycle
// and stays while en is low.
module lin_interp
  import bp_pkg::*;
#(
  parameter int W = SW,
  parameter int F = IFW,
  localparam int OW = W + F + 2
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic [W-1:0]         in1,     // sample i+1
  input  logic [W-1:0]         in2,     // sample i
  input  logic [F-1:0]         factor,  // interpolation factor, units 2^-F
  output logic signed [OW-1:0] contrib
);

  logic signed [W:0]     diff;
  logic signed [W+F:0]   prod;
  logic signed [W+F:0]   prod_q;
  logic [W-1:0]          in2_q;

  always_comb begin
    diff = signed'({1'b0, in1}) - signed'({1'b0, in2});
    prod = diff * signed'({1'b0, factor});
  end

  always_ff @(posedge clk) begin
    if (en) begin
      prod_q <= prod;
      in2_q  <= in2;
    end
  end

  // Stage 6, first adder: in2 enters shifted by F (W+F bits, unsigned).
  assign contrib = OW'(prod_q) + signed'(OW'({in2_q, {F{1'b0}}}));

endmodule
