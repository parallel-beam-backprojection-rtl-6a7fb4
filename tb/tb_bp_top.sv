// tb_bp_top - end-to-end test of the backprojection engine.
//
// Runs four reduced configurations side by side, each a complete
// reconstruction checked pixel by pixel against the closed-form reference:
//   A: 16x16 image, 32 projections of 32 samples, 4 lanes, 2 input banks,
//      SRAM latency 8  -> accumulation adder in stage 6, long stalls at
//      every set start, prefetch fully hidden behind processing;
//   B: 4x4 image, 16 projections of 8 samples, 8 lanes, 1 input bank,
//      latency 1       -> accumulation in stage 7, prefetch slower than
//      processing so the controller must wait for it;
//   C: 32x32 image, 64 projections of 64 samples, 16 lanes, 2 banks of two
//      pairs (the default organisation), latency 2;
//   D: 8x8 image, 4 projections of 16 samples, 1 lane (the non-parallel
//      engine), 1 bank, latency 3.
// Besides the pixel values, pixel rate and cycle counts (checked inside
// bp_env), it requires that each mechanism occurred at least once: pipeline
// stall, prefetch wait, prefetch overlapped with processing, writes to both
// accumulation banks (role swap), interpolation-factor saturation, and both
// parities of the sample index (the two swap directions).
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_bp_top;
  import tb_bp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 4;
  int     checks [NC], failures [NC], stall_ev [NC], pfw [NC], ovl [NC];
  int     bw [NC][2];
  longint cyc [NC];
  logic   fin [NC];

  bp_pair #(.IMG(16), .NDET(32), .NPROJ(32), .NPAR(4), .NBANK(2), .PPW(1), .MEM_RD_LAT(8)) u_a (
    .clk(clk), .checks(checks[0]), .failures(failures[0]), .fin(fin[0]), .stall_events(stall_ev[0]),
    .pfwait_cycles(pfw[0]), .overlap_cycles(ovl[0]), .bank_writes(bw[0]), .cycles(cyc[0]));
  bp_pair #(.IMG(4), .NDET(8), .NPROJ(16), .NPAR(8), .NBANK(1), .PPW(1), .MEM_RD_LAT(1)) u_b (
    .clk(clk), .checks(checks[1]), .failures(failures[1]), .fin(fin[1]), .stall_events(stall_ev[1]),
    .pfwait_cycles(pfw[1]), .overlap_cycles(ovl[1]), .bank_writes(bw[1]), .cycles(cyc[1]));
  bp_pair #(.IMG(32), .NDET(64), .NPROJ(64), .NPAR(16), .NBANK(2), .PPW(2), .MEM_RD_LAT(2)) u_c (
    .clk(clk), .checks(checks[2]), .failures(failures[2]), .fin(fin[2]), .stall_events(stall_ev[2]),
    .pfwait_cycles(pfw[2]), .overlap_cycles(ovl[2]), .bank_writes(bw[2]), .cycles(cyc[2]));
  bp_pair #(.IMG(8), .NDET(16), .NPROJ(4), .NPAR(1), .NBANK(1), .PPW(1), .MEM_RD_LAT(3)) u_d (
    .clk(clk), .checks(checks[3]), .failures(failures[3]), .fin(fin[3]), .stall_events(stall_ev[3]),
    .pfwait_cycles(pfw[3]), .overlap_cycles(ovl[3]), .bank_writes(bw[3]), .cycles(cyc[3]));

  int tchecks, tfail;

  task automatic need(string what, longint count);
    tchecks++;
    $display("mechanism %-28s occurred %0d times", what, count);
    if (count == 0) begin
      tfail++;
      $display("FAIL: mechanism %s never occurred", what);
    end
  endtask

  initial begin
    longint s_stall, s_pfw, s_ovl, s_b0, s_b1;
    tchecks = 0; tfail = 0;
    n_sat = 0; n_odd = 0; n_even = 0;
    @(posedge clk);
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    s_stall = 0; s_pfw = 0; s_ovl = 0; s_b0 = 0; s_b1 = 0;
    for (int i = 0; i < NC; i++) begin
      tchecks += checks[i];
      tfail   += failures[i];
      s_stall += stall_ev[i];
      s_pfw   += pfw[i];
      s_ovl   += ovl[i];
      s_b0    += bw[i][0];
      s_b1    += bw[i][1];
    end
    need("pipeline stall", s_stall);
    need("prefetch wait", s_pfw);
    need("prefetch during processing", s_ovl);
    need("write to accumulation bank 0", s_b0);
    need("write to accumulation bank 1", s_b1);
    need("interp factor saturation", n_sat);
    need("odd sample index", n_odd);
    need("even sample index", n_even);
    $display("TB_RESULT checks=%0d failures=%0d", tchecks, tfail);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", tchecks, tfail + 1);
    $finish;
  end

endmodule
