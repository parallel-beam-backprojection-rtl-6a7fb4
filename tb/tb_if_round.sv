// tb_if_round - exhaustive check of interpolation factor rounding:
// for every 5-bit fraction x (units of 1/32) the factor must be
// min(15, floor(x/2 + 1/2)) (round to nearest, saturate at 15/16).
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_if_round;
  logic [4:0] frac_hi;
  logic [3:0] factor;
  int checks = 0, failures = 0;
  int sat = 0;

  if_round #(.W(4)) dut (.*);

  initial begin
    for (int x = 0; x < 32; x++) begin
      int exp;
      frac_hi = 5'(x);
      #1;
      exp = int'($floor(real'(x) / 2.0 + 0.5));
      if (exp > 15) begin
        exp = 15;
        sat++;
      end
      checks++;
      if (factor !== 4'(exp)) begin
        failures++;
        $display("FAIL x=%0d factor=%0d expected %0d", x, factor, exp);
      end
    end
    checks++;
    if (sat != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
