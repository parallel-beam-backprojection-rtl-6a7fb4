// sag_col - pipeline stage 1: column spatial address generation.
//
// For the image row about to be processed, produces the detector-axis address
// of the point just left of the row's first pixel. Rows are walked from the
// top: the address moves by -D*sin(theta) (LUT 2) from one row to the next.
// A multiplexer picks LUT 1 (the address one row above and one column left of
// the first pixel) on the first row, or the register's own value on later
// rows, and a subtractor removes the LUT 2 step:
//     col_addr(row r) = LUT1 - (r+1) * LUT2        (mod 2^(AI+FRAC))
// The multiplexer/subtractor/register structure is the document's; the
// alignment of the stored formats (LUT 1 padded with zero LSBs, LUT 2
// zero-extended) and the wrap-around arithmetic are this design's reading of
// the stated bit widths.
//
// Timing: col_addr updates on the clock edge where en && row_start, i.e. when
// the first pixel of a row enters stage 1 (once per IMG cycles). Stage 2 uses
// it in the following cycle.
module sag_col
  import bp_pkg::*;
#(
  parameter int AI = 10,   // integer bits of the spatial address
  localparam int AW = AI + FRAC
) (
  input  logic                 clk,
  input  logic                 en,         // pipeline advance
  input  logic                 row_start,  // first pixel of a row is issued
  input  logic                 first_row,  // ... and it is row 0
  input  logic [AI+L1_FRAC-1:0] lut1,      // start address, AI.5
  input  logic [L2_W-1:0]      lut2,       // row step, 1.15 unsigned
  output logic [AW-1:0]        col_addr
);

  logic [AW-1:0] base, step;

  always_comb begin
    base = first_row ? {lut1, {(FRAC - L1_FRAC){1'b0}}} : col_addr;
    step = AW'(lut2);
  end

  always_ff @(posedge clk) begin
    if (en && row_start) col_addr <= base - step;
  end

endmodule
