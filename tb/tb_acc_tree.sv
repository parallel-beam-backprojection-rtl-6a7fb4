// tb_acc_tree - adder tree and accumulation for 16 lanes (accumulation in
// stage 7) and for 4 lanes (accumulation in stage 6). Random contributions
// over the full 15-bit range; the new sum must equal previous + sum of
// contributions two clocks later (previous forced to 0 by acc_zero), and
// the pipeline must hold while en is low.
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_acc_tree;
  import bp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic signed [CW-1:0] c16 [16];
  logic signed [CW-1:0] c4 [4];
  logic signed [ACC_W-1:0] acc16, acc4, sum16, sum4;
  logic zero16, zero4;
  int checks = 0, failures = 0;

  acc_tree #(.NPAR(16)) d16 (.clk(clk), .en(en), .contrib(c16), .acc_in(acc16), .acc_zero(zero16), .sum(sum16));
  acc_tree #(.NPAR(4))  d4  (.clk(clk), .en(en), .contrib(c4),  .acc_in(acc4),  .acc_zero(zero4),  .sum(sum4));

  longint e16, e4;

  initial begin
    en = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = 1;
      e16 = 0; e4 = 0;
      for (int k = 0; k < 16; k++) begin
        c16[k] = CW'($urandom);
        if (n == 0) c16[k] = -15'sd16384;
        if (n == 1) c16[k] = 15'sd16383;
        e16 += longint'(c16[k]);
      end
      for (int k = 0; k < 4; k++) begin c4[k] = CW'($urandom); e4 += longint'(c4[k]); end
      zero16 = ($urandom_range(3) == 0);
      zero4 = ($urandom_range(3) == 0);
      // 16 lanes: the accumulation adder is in stage 7, one clock later
      acc4 = ACC_W'($urandom_range(1 << 22));
      if (!zero4) e4 += longint'(acc4);
      @(negedge clk);
      acc16 = ACC_W'($urandom_range(1 << 22));
      if (!zero16) e16 += longint'(acc16);
      // stall one clock: nothing may move
      en = 0;
      @(negedge clk);
      en = 1;
      @(negedge clk);
      checks += 2;
      if (sum16 !== ACC_W'(e16)) begin failures++; $display("FAIL 16: %0d vs %0d", sum16, e16); end
      if (sum4 !== ACC_W'(e4)) begin failures++; $display("FAIL 4: %0d vs %0d", sum4, e4); end
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
