// tb_lin_interp - linear interpolation: one clock after en, contrib must be
// (in1 - in2) * IF + 16 * in2 for random 9-bit samples and 4-bit factors,
// including the extremes; it must hold while en is low.
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_lin_interp;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic [8:0] in1, in2;
  logic [3:0] factor;
  logic signed [14:0] contrib;
  int checks = 0, failures = 0;

  lin_interp #(.W(9), .F(4)) dut (.*);

  initial begin
    en = 1;
    for (int n = 0; n < 600; n++) begin
      int exp;
      @(negedge clk);
      en = 1;
      in1 = 9'($urandom); in2 = 9'($urandom); factor = 4'($urandom);
      if (n == 0) begin in1 = 0;   in2 = 511; factor = 15; end
      if (n == 1) begin in1 = 511; in2 = 0;   factor = 15; end
      exp = (int'(in1) - int'(in2)) * int'(factor) + 16 * int'(in2);
      @(negedge clk);
      checks++;
      if (contrib !== 15'(exp)) begin
        failures++;
        $display("FAIL in1=%0d in2=%0d if=%0d got %0d exp %0d", in1, in2, factor, contrib, exp);
      end
      en = 0; in1 = 9'($urandom); in2 = 9'($urandom);
      @(negedge clk);
      checks++;
      if (contrib !== 15'(exp)) begin
        failures++;
        $display("FAIL hold");
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
