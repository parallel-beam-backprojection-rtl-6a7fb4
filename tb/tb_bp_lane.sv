// tb_bp_lane - one lane backprojecting 4 projections (one per set) of 32
// samples into a 16 x 16 image. For each set the testbench loads the lane's
// LUT entries and its projection buffer (background half, then swaps), issues
// the 256 pixels in raster order with random stall clocks, and compares every
// stage-6 contribution with the closed-form reference of tb_bp_pkg.
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_bp_lane;
  import bp_pkg::*;
  import tb_bp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int NDET = 32, NSETS = 4, IMG = 16;
  logic en, lut_we, iss_valid, iss_first_col, iss_first_row, fg, pf_en;
  lut_sel_e lut_sel;
  logic [1:0] lut_idx, set_idx;
  logic [L3_W-1:0] lut_wdata;
  logic [3:0] pf_addr;
  logic [SW-1:0] pf_even, pf_odd;
  logic signed [CW-1:0] contrib;
  int checks = 0, failures = 0;

  bp_lane #(.NDET(NDET), .NSETS(NSETS)) dut (.*);

  // pixel tracking: index 1 is the pixel being issued, index k the one
  // held in stage k-1; the contribution belongs to the stage-5 pixel
  logic v [1:6];
  int   pr [1:6], pc [1:6];
  int   cur_set;
  always @(posedge clk) if (en) begin
    if (v[6]) begin
      int exp;
      exp = ref_contrib(cur_set, pr[6], pc[6], NSETS, IMG, NDET);
      checks++;
      if (contrib !== CW'(exp)) begin
        failures++;
        $display("FAIL set %0d pixel (%0d,%0d): %0d expected %0d", cur_set, pr[6], pc[6], contrib, exp);
      end
    end
    for (int k = 6; k > 1; k--) begin v[k] <= v[k-1]; pr[k] <= pr[k-1]; pc[k] <= pc[k-1]; end
  end

  initial begin
    for (int k = 1; k <= 6; k++) v[k] = 0;
    en = 1; lut_we = 0; iss_valid = 0; iss_first_col = 0; iss_first_row = 0;
    fg = 1; pf_en = 0; set_idx = 0; lut_sel = LUT_START; lut_idx = 0; lut_wdata = 0;
    pf_addr = 0; pf_even = 0; pf_odd = 0;
    for (int s = 0; s < NSETS; s++) begin
      for (int t = 0; t < 3; t++) begin
        @(negedge clk);
        lut_we = 1; lut_sel = lut_sel_e'(t); lut_idx = 2'(s);
        lut_wdata = (t == 0) ? L3_W'(lut1(s, NSETS, IMG, NDET))
                  : (t == 1) ? L3_W'(lut2(s, NSETS, IMG, NDET)) : L3_W'(lut3(s, NSETS, IMG, NDET));
      end
    end
    @(negedge clk);
    lut_we = 0;
    for (int s = 0; s < NSETS; s++) begin
      // load the projection into the background half and swap
      for (int j = 0; j < NDET / 2; j++) begin
        @(negedge clk);
        pf_en = 1; pf_addr = 4'(j);
        pf_even = 9'(sample(s, 2*j, NDET)); pf_odd = 9'(sample(s, 2*j+1, NDET));
      end
      @(negedge clk);
      pf_en = 0;
      repeat (8) @(negedge clk);   // drain the previous set
      fg = ~fg; set_idx = 2'(s); cur_set = s;
      @(negedge clk);
      for (int r = 0; r < IMG; r++)
        for (int c = 0; c < IMG; c++) begin
          while ($urandom_range(4) == 0) begin
            en = 0; iss_valid = 1;
            @(negedge clk);
          end
          en = 1; iss_valid = 1; iss_first_col = (c == 0); iss_first_row = (r == 0);
          v[1] = 1; pr[1] = r; pc[1] = c;
          @(negedge clk);
        end
      iss_valid = 0; v[1] = 0; en = 1;
      repeat (8) @(negedge clk);
    end
    checks++;
    if (checks < NSETS * IMG * IMG) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
