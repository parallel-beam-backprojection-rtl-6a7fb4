// bp_pair - one bp_top instance at the given parameters, wired to its host
// and memory environment (bp_env). Used by the end-to-end testbench to run
// several configurations side by side; the results are passed up.
// A testbench convenience, not part of the design.
module bp_pair
  import bp_pkg::*;
#(
  parameter int IMG        = 16,
  parameter int NDET       = 32,
  parameter int NPROJ      = 32,
  parameter int NPAR       = 4,
  parameter int NBANK      = 2,
  parameter int PPW        = 1,
  parameter int MEM_RD_LAT = 2,
  parameter int NCHECK     = 0,
  parameter longint MAXCYC = 64'd2_000_000,
  localparam int NSETS = NPROJ / NPAR,
  localparam int SAW   = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int LW    = (NPAR > 1) ? $clog2(NPAR) : 1,
  localparam int PAW   = $clog2(IMG * IMG),
  localparam int WW    = PPW * 2 * SW
) (
  input  logic   clk,
  output int     checks,
  output int     failures,
  output logic   fin,
  output int     stall_events,
  output int     pfwait_cycles,
  output int     overlap_cycles,
  output int     bank_writes [2],
  output longint cycles
);

  logic rst_n, start, busy, done, result_bank, lut_we, stall, pf_wait;
  lut_sel_e lut_sel;
  logic [LW-1:0]    lut_lane;
  logic [SAW-1:0]   lut_idx;
  logic [L3_W-1:0]  lut_wdata;
  logic [19:0]      sin_addr  [NBANK];
  logic             sin_re    [NBANK];
  logic [WW-1:0]    sin_rdata [NBANK];
  logic [PAW-1:0]   acc_addr  [2];
  logic             acc_re    [2];
  logic             acc_we    [2];
  logic [ACC_W-1:0] acc_wdata [2];
  logic [ACC_W-1:0] acc_rdata [2];

  bp_top #(.IMG(IMG), .NDET(NDET), .NPROJ(NPROJ), .NPAR(NPAR), .NBANK(NBANK), .PPW(PPW),
           .MEM_RD_LAT(MEM_RD_LAT), .SIN_AW(20)) u_dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done), .result_bank(result_bank),
    .lut_we(lut_we), .lut_sel(lut_sel), .lut_lane(lut_lane), .lut_idx(lut_idx), .lut_wdata(lut_wdata),
    .sin_addr(sin_addr), .sin_re(sin_re), .sin_rdata(sin_rdata),
    .acc_addr(acc_addr), .acc_re(acc_re), .acc_we(acc_we), .acc_wdata(acc_wdata), .acc_rdata(acc_rdata),
    .stall(stall), .pf_wait(pf_wait));

  bp_env #(.IMG(IMG), .NDET(NDET), .NPROJ(NPROJ), .NPAR(NPAR), .NBANK(NBANK), .PPW(PPW),
           .MEM_RD_LAT(MEM_RD_LAT), .SIN_AW(20), .NCHECK(NCHECK), .MAXCYC(MAXCYC)) u_env (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done), .result_bank(result_bank),
    .lut_we(lut_we), .lut_sel(lut_sel), .lut_lane(lut_lane), .lut_idx(lut_idx), .lut_wdata(lut_wdata),
    .sin_addr(sin_addr), .sin_re(sin_re), .sin_rdata(sin_rdata),
    .acc_addr(acc_addr), .acc_re(acc_re), .acc_we(acc_we), .acc_wdata(acc_wdata), .acc_rdata(acc_rdata),
    .stall(stall), .pf_wait(pf_wait),
    .checks(checks), .failures(failures), .fin(fin), .stall_events(stall_events),
    .pfwait_cycles(pfwait_cycles), .overlap_cycles(overlap_cycles), .bank_writes(bank_writes),
    .cycles(cycles));

endmodule
