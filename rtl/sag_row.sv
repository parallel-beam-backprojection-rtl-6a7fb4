// sag_row - pipeline stage 2: row spatial address generation.
//
// Produces one spatial address per clock, walking a row from left to right.
// At the first pixel of a row a multiplexer takes the stage-1 address (the
// point just left of the row); at the other pixels it takes the register's own
// value. An adder adds the signed pixel-to-pixel step D*cos(theta) (LUT 3,
// sign-extended):
//     addr(r, c) = col_addr(r) + (c+1) * LUT3      (mod 2^(AI+FRAC))
// The integer part of addr indexes the projection, the fraction is the
// interpolation position. Structure as in the document's datapath; the sign
// extension and wrap-around are this design's reading of the stated formats.
//
// Timing: addr updates on the clock edge where en && valid_in, one clock after
// the pixel entered stage 1.
module sag_row
  import bp_pkg::*;
#(
  parameter int AI = 10,
  localparam int AW = AI + FRAC
) (
  input  logic                   clk,
  input  logic                   en,        // pipeline advance
  input  logic                   valid_in,  // a pixel is in stage 1
  input  logic                   first_col, // ... and it is column 0
  input  logic [AW-1:0]          col_addr,  // from stage 1
  input  logic signed [L3_W-1:0] lut3,      // pixel step, 2.15 signed
  output logic [AW-1:0]          addr
);

  logic [AW-1:0] base, step;

  always_comb begin
    base = first_col ? col_addr : addr;
    step = {{(AW - L3_W){lut3[L3_W-1]}}, lut3};  // sign extension
  end

  always_ff @(posedge clk) begin
    if (en && valid_in) addr <= base + step;
  end

endmodule
