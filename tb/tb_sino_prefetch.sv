// tb_sino_prefetch - loads projection sets 0, 2 and 1 of a small
// configuration (8 lanes, 32 detectors, 2 banks of 2 pairs, latency 3)
// from the input SRAM model and records every lane write. Each lane must
// receive every pair j of its projection s*8 + lane exactly once, with the
// right even and odd samples, and busy must last LOADCYC + latency clocks
// (64 + 3) with one done pulse.
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_sino_prefetch;
  import tb_bp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int NPAR = 8, NDET = 32, NBANK = 2, PPW = 2, LAT = 3, NSETS = 4;
  localparam int LOADCYC = NPAR * (NDET / 2) / (NBANK * PPW);
  logic rst_n, start, busy, done;
  logic [1:0] set_idx;
  logic [19:0] sin_addr [NBANK];
  logic sin_re [NBANK];
  logic [35:0] sin_rdata [NBANK];
  logic [NPAR-1:0] pf_en;
  logic [3:0] pf_addr;
  logic [8:0] pf_even [NPAR], pf_odd [NPAR];
  int checks = 0, failures = 0;
  int seen [NPAR][NDET/2];
  int busy_cycles, done_pulses;

  sino_prefetch #(.NPAR(NPAR), .NDET(NDET), .NSETS(NSETS), .NBANK(NBANK), .PPW(PPW),
                  .MEM_RD_LAT(LAT), .SIN_AW(20)) dut (.*);

  for (genvar b = 0; b < NBANK; b++) begin : g_mem
    sino_sram_model #(.NPAR(NPAR), .NDET(NDET), .NBANK(NBANK), .PPW(PPW), .BANK(b), .AW(20), .LAT(LAT))
      u_mem (.clk(clk), .addr(sin_addr[b]), .re(sin_re[b]), .rdata(sin_rdata[b]));
  end

  int cur_set;
  always @(posedge clk) begin
    if (busy) busy_cycles++;
    if (done) done_pulses++;
    for (int l = 0; l < NPAR && rst_n; l++) begin
      if (pf_en[l]) begin
        int p, j;
        p = cur_set * NPAR + l;
        j = int'(pf_addr);
        seen[l][j]++;
        checks++;
        if (pf_even[l] !== 9'(sample(p, 2*j, NDET)) || pf_odd[l] !== 9'(sample(p, 2*j+1, NDET))) begin
          failures++;
          $display("FAIL set %0d lane %0d pair %0d", cur_set, l, j);
        end
      end
    end
  end

  initial begin
    int order [3] = '{0, 2, 1};
    rst_n = 0; start = 0; set_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (order[n]) begin
      for (int l = 0; l < NPAR; l++) for (int j = 0; j < NDET/2; j++) seen[l][j] = 0;
      busy_cycles = 0; done_pulses = 0;
      cur_set = order[n];
      @(negedge clk);
      start = 1; set_idx = 2'(order[n]);
      @(negedge clk);
      start = 0;
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      for (int l = 0; l < NPAR; l++)
        for (int j = 0; j < NDET/2; j++) begin
          checks++;
          if (seen[l][j] != 1) begin failures++; $display("FAIL lane %0d pair %0d written %0d times", l, j, seen[l][j]); end
        end
      checks += 2;
      if (busy_cycles != LOADCYC + LAT) begin failures++; $display("FAIL busy %0d cycles", busy_cycles); end
      if (done_pulses != 1) begin failures++; $display("FAIL %0d done pulses", done_pulses); end
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
