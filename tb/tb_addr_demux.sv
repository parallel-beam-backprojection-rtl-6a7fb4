// tb_addr_demux - exhaustive check of even/odd address formation.
// Sample k lives in the even RAM at k/2 (k even) or in the odd RAM at
// (k-1)/2 (k odd). For every integer part i the two words read,
// sample 2*even_addr and sample 2*odd_addr+1, must be exactly {i, i+1}
// (modulo 1024), and idx_odd must be the parity of i.
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_addr_demux;
  logic [9:0] idx;
  logic [8:0] even_addr, odd_addr;
  logic       idx_odd;
  int checks = 0, failures = 0;

  addr_demux #(.AI(10)) dut (.*);

  initial begin
    for (int i = 0; i < 1024; i++) begin
      int se, so, lo, hi;
      idx = 10'(i);
      #1;
      se = 2 * int'(even_addr);
      so = 2 * int'(odd_addr) + 1;
      lo = i;
      hi = (i + 1) % 1024;
      checks++;
      if (!((se == lo && so == hi) || (so == lo && se == hi)) || idx_odd !== 1'(i % 2)) begin
        failures++;
        $display("FAIL i=%0d even=%0d odd=%0d", i, even_addr, odd_addr);
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
