// acc_tree - stages 6 and 7: addition tree and pixel accumulation.
//
// Adds the NPAR lane contributions (CW bits each) in a binary tree whose
// adders grow by one bit per level, then adds the sum to the pixel's value
// from the previous projection sets (read from the source accumulation RAM)
// and delivers the new ACC_W-bit value for the destination RAM.
//
// Placement: as in the document's 4-way datapath, stage 6 holds the lanes'
// interpolation adders (inside the lanes) and up to two tree levels. When
// NPAR > 4 the tree does not fit there; the remaining levels and the
// accumulation adder are placed in stage 7 (the document moves "the last two
// levels" to stage 7 for 16 lanes; which adders exactly is this design's
// reading). For NPAR <= 4 the accumulation adder stays in stage 6 and stage 7
// only registers the result. ACC_IN_S7 tells the controller in which stage
// the previous value (acc_in) must be presented.
//
// Timing: both stage registers advance on en. acc_in and acc_zero are used in
// stage 6 (ACC_IN_S7 = 0) or stage 7 (ACC_IN_S7 = 1). acc_zero replaces the
// previous value by 0 (first projection set). sum is the stage-7 register.
module acc_tree
  import bp_pkg::*;
#(
  parameter int NPAR = 16,
  localparam int L   = tree_levels(NPAR),
  localparam int L6  = s6_levels(NPAR),
  localparam bit ACC_IN_S7 = (L > L6)
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic signed [CW-1:0]    contrib [NPAR],
  input  logic signed [ACC_W-1:0] acc_in,
  input  logic                    acc_zero,
  output logic signed [ACC_W-1:0] sum
);

  logic signed [ACC_W-1:0] prev;
  assign prev = acc_zero ? '0 : acc_in;

  // Stage-6 tree: level 0 are the contributions, level l has NPAR>>l sums.
  for (genvar l = 0; l <= L6; l++) begin : s6
    logic signed [CW+l-1:0] s [NPAR >> l];
    if (l == 0) begin : g_in
      for (genvar k = 0; k < NPAR; k++) begin : g_k
        assign s[k] = contrib[k];
      end
    end else begin : g_add
      for (genvar k = 0; k < (NPAR >> l); k++) begin : g_k
        assign s[k] = (CW+l)'(s6[l-1].s[2*k]) + (CW+l)'(s6[l-1].s[2*k+1]);
      end
    end
  end

  if (!ACC_IN_S7) begin : g_acc6
    logic signed [ACC_W-1:0] s6_q;
    always_ff @(posedge clk) begin
      if (en) s6_q <= ACC_W'(s6[L6].s[0]) + prev;
    end
    always_ff @(posedge clk) begin
      if (en) sum <= s6_q;
    end
  end else begin : g_acc7
    // stage-6 register holds NPAR>>L6 partial sums
    logic signed [CW+L6-1:0] r6 [NPAR >> L6];
    always_ff @(posedge clk) begin
      if (en) r6 <= s6[L6].s;
    end
    // stage-7 tree levels L6+1 .. L
    for (genvar l = L6; l <= L; l++) begin : s7
      logic signed [CW+l-1:0] s [NPAR >> l];
      if (l == L6) begin : g_in
        assign s = r6;
      end else begin : g_add
        for (genvar k = 0; k < (NPAR >> l); k++) begin : g_k
          assign s[k] = (CW+l)'(s7[l-1].s[2*k]) + (CW+l)'(s7[l-1].s[2*k+1]);
        end
      end
    end
    always_ff @(posedge clk) begin
      if (en) sum <= ACC_W'(s7[L].s[0]) + prev;
    end
  end

endmodule
