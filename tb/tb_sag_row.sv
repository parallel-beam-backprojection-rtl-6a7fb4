// tb_sag_row - checks stage 2 of spatial address generation.
// For random row start addresses and signed LUT 3 steps, walks rows of 64
// pixels with random stalls; pixel c must get col_addr + (c+1)*LUT3
// (LUT 3 sign-extended, modulo 2^25).
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_sag_row;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, valid_in, first_col;
  logic [24:0] col_addr, addr;
  logic signed [16:0] lut3;
  int checks = 0, failures = 0;

  sag_row #(.AI(10)) dut (.*);

  initial begin
    en = 1; valid_in = 0; first_col = 0; col_addr = '0; lut3 = '0;
    for (int row = 0; row < 30; row++) begin
      col_addr = 25'($urandom);
      lut3 = 17'($urandom);
      if (row == 0) lut3 = -17'sd46341;  // the most negative step used
      for (int c = 0; c < 64; c++) begin
        @(negedge clk);
        en = 1; valid_in = 1; first_col = (c == 0);
        @(negedge clk);
        valid_in = 0; first_col = 0;
        checks++;
        if (addr !== 25'(longint'(col_addr) + longint'(c + 1) * longint'(lut3))) begin
          failures++;
          $display("FAIL row %0d c %0d addr %h", row, c, addr);
        end
        if ($urandom_range(3) == 0) begin
          en = 0; valid_in = 1;
          @(negedge clk);
          valid_in = 0; en = 1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
