// bp_pkg - fixed-point formats of the parallel-beam backprojection engine.
//
// All blocks share these widths. A spatial address (position on the detector
// axis, in detector units) is an unsigned fixed-point number with AI integer
// bits and FRAC = 15 fractional bits; with 1024 detectors that is 10.15 = 25
// bits. The three look-up tables are stored in narrower formats and aligned to
// the address format before use:
//   LUT 1 (start address of a projection)   : AI.5   unsigned
//   LUT 2 (row-to-row step,  D*sin(theta))  : 1.15   unsigned
//   LUT 3 (pixel-to-pixel step, D*cos(theta)): 2.15  two's complement
// Filtered sinogram samples are 9-bit unsigned codes, the interpolation factor
// is 4 bits (units of 1/16), and pixel sums are 25-bit signed. These numbers
// follow the quantization study of the design; the helper functions are this
// implementation's own.
package bp_pkg;

  localparam int SW      = 9;   // filtered sinogram sample width
  localparam int IFW     = 4;   // interpolation factor width (fraction of 1)
  localparam int FRAC    = 15;  // fractional bits of the spatial address
  localparam int L1_FRAC = 5;   // fractional bits stored in LUT 1
  localparam int L2_W    = 16;  // LUT 2 width (1 integer + 15 fraction)
  localparam int L3_W    = 17;  // LUT 3 width (sign + 1 integer + 15 fraction)
  localparam int CW      = SW + IFW + 2; // one projection's contribution (15)
  localparam int ACC_W   = 25;  // accumulated pixel value

  // Selects which LUT a host write goes to.
  typedef enum logic [1:0] {
    LUT_START = 2'd0,  // LUT 1
    LUT_ROW   = 2'd1,  // LUT 2
    LUT_COL   = 2'd2   // LUT 3
  } lut_sel_e;

  // Number of adder-tree levels for n inputs (n a power of two).
  function automatic int tree_levels(int n);
    int l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  // Tree levels placed in stage 6; the rest, and then the accumulation
  // adder, move to stage 7.
  function automatic int s6_levels(int n);
    return (tree_levels(n) < 2) ? tree_levels(n) : 2;
  endfunction

endpackage
