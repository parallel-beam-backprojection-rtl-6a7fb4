// tb_accum_reader - the read flow must deliver the NPIX words of the source
// RAM in address order, whatever the consumer does: the RAM model (latency
// 4) holds word i = 7*i + 3, the consumer pops on random clocks, and the
// words must come out in order, exactly NPIX per set, over two sets. With a
// consumer that pops every clock, after the first word arrives the FIFO must
// never run empty (reads keep up with one pixel per clock).
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_accum_reader;
  import bp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int LAT = 4, AW = 6, NPIX = 50;
  logic rst_n, restart, acc_re, out_valid, pop;
  logic [AW-1:0] acc_addr;
  logic signed [ACC_W-1:0] acc_rdata, out_data;
  logic [ACC_W-1:0] rd_raw;
  int checks = 0, failures = 0;

  accum_reader #(.MEM_RD_LAT(LAT), .AW(AW), .NPIX(NPIX), .DEPTH(LAT + 4)) dut (.*);
  zbt_sram_model #(.AW(AW), .DW(ACC_W), .LAT(LAT)) u_mem (
    .clk(clk), .addr(acc_addr), .re(acc_re), .we(1'b0), .wdata('0), .rdata(rd_raw));
  assign acc_rdata = signed'(rd_raw);

  int reads;
  always @(posedge clk) if (acc_re) reads++;

  initial begin
    rst_n = 0; restart = 0; pop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < (1 << AW); i++) u_mem.mem[i] = ACC_W'(7 * i + 3);
    for (int set = 0; set < 3; set++) begin
      int got, empties;
      logic started;
      reads = 0; got = 0; empties = 0; started = 0;
      @(negedge clk);
      restart = 1;
      @(negedge clk);
      restart = 0;
      while (got < NPIX) begin
        pop = (set == 2) ? 1'b1 : 1'($urandom_range(1));
        if (out_valid) started = 1;
        if (started && !out_valid && set == 2) empties++;
        if (pop && out_valid) begin
          checks++;
          if (out_data !== ACC_W'(7 * got + 3)) begin
            failures++;
            $display("FAIL set %0d word %0d: %0d", set, got, out_data);
          end
          got++;
        end else pop = 0;
        @(negedge clk);
      end
      pop = 0;
      repeat (10) @(negedge clk);
      checks += 2;
      if (reads != NPIX) begin failures++; $display("FAIL %0d reads", reads); end
      if (out_valid) begin failures++; $display("FAIL extra data"); end
      if (set == 2) begin
        checks++;
        if (empties != 0) begin failures++; $display("FAIL FIFO ran empty %0d times", empties); end
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
