// tb_sag_col - checks stage 1 of spatial address generation.
// Random LUT 1 / LUT 2 values, 40 rows with random stall cycles in between;
// after every row start the register must equal LUT1*2^10 - (r+1)*LUT2
// modulo 2^25, and it must hold while en is low or no row starts.
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_sag_col;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, row_start, first_row;
  logic [14:0] lut1;
  logic [15:0] lut2;
  logic [24:0] col_addr;
  int checks = 0, failures = 0;

  sag_col #(.AI(10)) dut (.*);

  task automatic chk(logic [24:0] exp);
    checks++;
    if (col_addr !== exp) begin
      failures++;
      $display("FAIL col_addr %h expected %h", col_addr, exp);
    end
  endtask

  initial begin
    for (int set = 0; set < 4; set++) begin
      logic [24:0] held;
      lut1 = 15'($urandom);
      lut2 = 16'($urandom);
      en = 1; row_start = 0; first_row = 0;
      for (int r = 0; r < 40; r++) begin
        @(negedge clk);
        en = 1; row_start = 1; first_row = (r == 0);
        @(negedge clk);
        row_start = 0;
        chk(25'({lut1, 10'b0} - 25'(r + 1) * 25'(lut2)));
        held = col_addr;
        // a stalled row start must not update
        en = 0; row_start = 1; first_row = 1;
        @(negedge clk);
        row_start = 0; first_row = 0; en = 1;
        chk(held);
        repeat ($urandom_range(3)) @(negedge clk);
        chk(held);
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
