// tb_sample_swap - the higher-indexed sample must reach in1: for even i the
// odd RAM holds sample i+1, for odd i the even RAM does. Random words.
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_sample_swap;
  logic       idx_odd;
  logic [8:0] even_val, odd_val, in1, in2;
  int checks = 0, failures = 0;

  sample_swap #(.W(9)) dut (.*);

  initial begin
    for (int n = 0; n < 200; n++) begin
      idx_odd = 1'($urandom);
      even_val = 9'($urandom);
      odd_val = 9'($urandom);
      #1;
      checks++;
      if (idx_odd ? (in1 !== even_val || in2 !== odd_val)
                  : (in1 !== odd_val || in2 !== even_val)) begin
        failures++;
        $display("FAIL odd=%0d e=%0d o=%0d in1=%0d in2=%0d", idx_odd, even_val, odd_val, in1, in2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
