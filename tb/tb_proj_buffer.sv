// tb_proj_buffer - double buffering of one lane's projection store.
// Fills the background set with projection A, swaps, then reads random
// sample pairs of A while projection B is written into the other set
// (reads must be unaffected), swaps again and reads B. Also checks that a
// read with rd_en low holds its output.
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_proj_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int NDET = 64;
  logic fg, wr_en, rd_en;
  logic [4:0] wr_addr, rd_addr_even, rd_addr_odd;
  logic [8:0] wr_even, wr_odd, rd_even, rd_odd;
  int checks = 0, failures = 0;
  logic [8:0] pa [NDET], pb [NDET];

  proj_buffer #(.NDET(NDET), .W(9)) dut (.*);

  task automatic rd_check(logic [8:0] p [NDET], int ea, int oa);
    @(negedge clk);
    rd_en = 1; rd_addr_even = 5'(ea); rd_addr_odd = 5'(oa);
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (rd_even !== p[2*ea] || rd_odd !== p[2*oa+1]) begin
      failures++;
      $display("FAIL read e%0d o%0d: %0d %0d expected %0d %0d", ea, oa, rd_even, rd_odd, p[2*ea], p[2*oa+1]);
    end
    rd_addr_even = 5'($urandom); rd_addr_odd = 5'($urandom);
    @(negedge clk);
    checks++;
    if (rd_even !== p[2*ea] || rd_odd !== p[2*oa+1]) begin
      failures++;
      $display("FAIL hold");
    end
  endtask

  initial begin
    for (int i = 0; i < NDET; i++) begin pa[i] = 9'($urandom); pb[i] = 9'($urandom); end
    fg = 1; wr_en = 0; rd_en = 0; wr_addr = 0; wr_even = 0; wr_odd = 0;
    rd_addr_even = 0; rd_addr_odd = 0;
    for (int j = 0; j < NDET / 2; j++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 5'(j); wr_even = pa[2*j]; wr_odd = pa[2*j+1];
    end
    @(negedge clk);
    wr_en = 0; fg = 0;
    // read A while B is written into the background set
    fork
      for (int j = 0; j < NDET / 2; j++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 5'(j); wr_even = pb[2*j]; wr_odd = pb[2*j+1];
      end
      for (int n = 0; n < 10; n++) rd_check(pa, $urandom_range(31), $urandom_range(31));
    join
    @(negedge clk);
    wr_en = 0; fg = 1;
    for (int n = 0; n < 40; n++) rd_check(pb, $urandom_range(31), $urandom_range(31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
