// tb_bp_cases - the two other full-size engine versions, run side by side.
//
// Both reconstruct a 512 x 512 image from projections of 1024 samples, like
// the default engine, but with other lane counts:
//   8-way:        NPAR = 8, two input banks of two sample pairs per word,
//                 all 1024 projections;
//   non-parallel: NPAR = 1, one input bank of one pair per word, only 64
//                 projections (the full 1024 sets would take over 268
//                 million clocks to simulate; every set costs the same, so
//                 the time is scaled by 1024/64).
// Each is checked at its corners and 300 random pixels against the
// closed-form reference, and its cycle count is checked by the environment
// (one load, IMG*IMG clocks per set, short drains). The testbench also checks
// the reconstruction times these counts give against the figures reported for
// these versions: at most 0.53 s at 65 MHz for the 8-way engine and at most
// 3.6 s at 75 MHz for the non-parallel one.
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_bp_cases;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int     checks [2], failures [2], stall_ev [2], pfw [2], ovl [2];
  int     bw [2][2];
  longint cyc [2];
  logic   fin [2];

  bp_pair #(.IMG(512), .NDET(1024), .NPROJ(1024), .NPAR(8), .NBANK(2), .PPW(2), .MEM_RD_LAT(2),
            .NCHECK(300), .MAXCYC(64'd34_000_000)) u_8way (
    .clk(clk), .checks(checks[0]), .failures(failures[0]), .fin(fin[0]), .stall_events(stall_ev[0]),
    .pfwait_cycles(pfw[0]), .overlap_cycles(ovl[0]), .bank_writes(bw[0]), .cycles(cyc[0]));
  bp_pair #(.IMG(512), .NDET(1024), .NPROJ(64), .NPAR(1), .NBANK(1), .PPW(1), .MEM_RD_LAT(2),
            .NCHECK(300), .MAXCYC(64'd17_500_000)) u_1way (
    .clk(clk), .checks(checks[1]), .failures(failures[1]), .fin(fin[1]), .stall_events(stall_ev[1]),
    .pfwait_cycles(pfw[1]), .overlap_cycles(ovl[1]), .bank_writes(bw[1]), .cycles(cyc[1]));

  int tchecks, tfail;

  task automatic time_check(string what, longint cycles, real mhz, real limit_s);
    real t;
    t = real'(cycles) / (mhz * 1.0e6);
    tchecks++;
    $display("%s: %0d clocks = %.3f s at %.0f MHz (limit %.2f s)", what, cycles, t, mhz, limit_s);
    if (t > limit_s) begin
      tfail++;
      $display("FAIL: %s too slow", what);
    end
  endtask

  initial begin
    tchecks = 0; tfail = 0;
    @(posedge clk);
    wait (fin[0] && fin[1]);
    for (int i = 0; i < 2; i++) begin
      tchecks += checks[i];
      tfail   += failures[i];
    end
    time_check("8-way", cyc[0], 65.0, 0.53);
    time_check("non-parallel", cyc[1] * 16, 75.0, 3.6);
    $display("TB_RESULT checks=%0d failures=%0d", tchecks, tfail);
    $finish;
  end

  initial begin
    repeat (35_000_000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", tchecks, tfail + 1);
    $finish;
  end

endmodule
