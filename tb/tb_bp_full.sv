// tb_bp_full - one complete reconstruction at the default size.
//
// bp_top with its default parameters (16 lanes, 512 x 512 pixels, 1024
// projections of 1024 samples, 2 input banks, SRAM latency 2): the host
// environment loads all 3 x 1024 LUT entries, runs the 64 projection sets
// (about 16.8 million clocks) and then checks the four corner pixels and
// 2000 random pixels against the closed-form reference, together with the
// number of accumulation writes and the total cycle count
// (2048 load cycles + 64 * 512 * 512 pixel cycles + a short drain per set).
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_bp_full;
  import bp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NBANK = 2;
  localparam int PPW   = 2;

  logic rst_n, start, busy, done, result_bank, lut_we, stall, pf_wait;
  lut_sel_e         lut_sel;
  logic [3:0]       lut_lane;
  logic [5:0]       lut_idx;
  logic [L3_W-1:0]  lut_wdata;
  logic [19:0]      sin_addr  [NBANK];
  logic             sin_re    [NBANK];
  logic [PPW*18-1:0] sin_rdata [NBANK];
  logic [17:0]      acc_addr  [2];
  logic             acc_re    [2];
  logic             acc_we    [2];
  logic [ACC_W-1:0] acc_wdata [2];
  logic [ACC_W-1:0] acc_rdata [2];

  int     checks, failures, stall_events, pfwait_cycles, overlap_cycles;
  int     bank_writes [2];
  longint cycles;
  logic   fin;

  bp_top u_dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done), .result_bank(result_bank),
    .lut_we(lut_we), .lut_sel(lut_sel), .lut_lane(lut_lane), .lut_idx(lut_idx), .lut_wdata(lut_wdata),
    .sin_addr(sin_addr), .sin_re(sin_re), .sin_rdata(sin_rdata),
    .acc_addr(acc_addr), .acc_re(acc_re), .acc_we(acc_we), .acc_wdata(acc_wdata), .acc_rdata(acc_rdata),
    .stall(stall), .pf_wait(pf_wait));

  bp_env #(.NCHECK(2000), .MAXCYC(64'd17_500_000)) u_env (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done), .result_bank(result_bank),
    .lut_we(lut_we), .lut_sel(lut_sel), .lut_lane(lut_lane), .lut_idx(lut_idx), .lut_wdata(lut_wdata),
    .sin_addr(sin_addr), .sin_re(sin_re), .sin_rdata(sin_rdata),
    .acc_addr(acc_addr), .acc_re(acc_re), .acc_we(acc_we), .acc_wdata(acc_wdata), .acc_rdata(acc_rdata),
    .stall(stall), .pf_wait(pf_wait),
    .checks(checks), .failures(failures), .fin(fin), .stall_events(stall_events),
    .pfwait_cycles(pfwait_cycles), .overlap_cycles(overlap_cycles), .bank_writes(bank_writes),
    .cycles(cycles));

  initial begin
    @(posedge clk);
    wait (fin === 1'b1);
    $display("prefetch overlapped processing in %0d cycles; %0d stall events", overlap_cycles, stall_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog (the environment has its own at 17.5 million cycles)
  initial begin
    repeat (18_000_000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
