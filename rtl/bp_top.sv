// bp_top - NPAR-way parallel-beam backprojection engine.
//
// Reconstructs an IMG x IMG image from NPROJ filtered projections of NDET
// samples each, following mu(x,y) = sum_k P_k(x cos t_k + y sin t_k). Pixels
// are visited in raster order, one per clock; NPAR projections (a projection
// set) are backprojected into each pixel at once, one per lane, and their sum
// is added to the pixel's value from the earlier sets. The running image sits
// in two external accumulation SRAMs that swap roles every set (one is read,
// the other written, at the same pixel address). Filtered projections come
// from NBANK external input SRAM banks and are prefetched into on-chip
// double buffers while the previous set is processed.
//
// Pipeline (seven stages, as in the document's datapath):
//   1 column spatial address (once per row)     2 row spatial address
//   3 interpolation factor rounding, even/odd RAM address formation
//   4 projection RAM read, buffer select, operand swap
//   5 subtract and multiply                     6 interpolation add, tree
//   7 remaining tree levels / accumulation, write to the destination SRAM
// Default parameters are the 16-way version: 512 x 512 pixels, 1024
// projections of 1024 samples, 64 sets, 2048-clock prefetch per set and
// about 64 * 512 * 512 clocks per image (0.26 s at 65 MHz). NPAR=1, NBANK=1,
// PPW=1 gives the non-parallel version.
//
// External SRAM ports: an address with re (input banks) or re/we (accumulation
// banks) is taken in the clock it is presented; read data must appear on
// *_rdata exactly MEM_RD_LAT clocks later. The final image is in accumulation
// bank result_bank when done pulses; pixel (r, c) is at address r*IMG + c,
// scaled by 2^IFW = 16 relative to the sum of interpolated sample codes.
//
// Host interface: before start, write the LUTs (lut_we, one entry per clock;
// lut_lane selects the lane, lut_idx the set, lut_sel the table) and the
// sinogram into the input SRAMs in the layout described in sino_prefetch.
// start is a one-clock pulse; busy is high until done.
//
// rst_n is an asynchronous reset. The assertions also use it to switch
// themselves off during reset, so a lint tool reports rst_n as used both
// asynchronously and synchronously; that use is intended.
module bp_top
  import bp_pkg::*;
#(
  parameter int IMG        = 512,
  parameter int NDET       = 1024,
  parameter int NPROJ      = 1024,
  parameter int NPAR       = 16,
  parameter int NBANK      = 2,
  parameter int PPW        = 2,
  parameter int MEM_RD_LAT = 2,
  parameter int SIN_AW     = 20,
  localparam int NSETS = NPROJ / NPAR,
  localparam int SAW   = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int LW    = (NPAR > 1) ? $clog2(NPAR) : 1,
  localparam int PAW   = $clog2(IMG * IMG),
  localparam int WW    = PPW * 2 * SW,
  localparam int BAW   = $clog2(NDET / 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              result_bank,
  // LUT load port
  input  logic              lut_we,
  input  lut_sel_e          lut_sel,
  input  logic [LW-1:0]     lut_lane,
  input  logic [SAW-1:0]    lut_idx,
  input  logic [L3_W-1:0]   lut_wdata,
  // input (sinogram) SRAM banks
  output logic [SIN_AW-1:0] sin_addr  [NBANK],
  output logic              sin_re    [NBANK],
  input  logic [WW-1:0]     sin_rdata [NBANK],
  // accumulation SRAM banks 0 and 1
  output logic [PAW-1:0]    acc_addr  [2],
  output logic              acc_re    [2],
  output logic              acc_we    [2],
  output logic [ACC_W-1:0]  acc_wdata [2],
  input  logic [ACC_W-1:0]  acc_rdata [2],
  // status
  output logic              stall,
  output logic              pf_wait
);

  // ---------------- control ----------------
  logic           en, iss_valid, iss_first_col, iss_first_row;
  logic [SAW-1:0] set_idx, pf_set;
  logic           fg, pf_start, pf_busy, pf_done;
  logic           rd_restart, rd_avail, rd_pop, acc_zero, src_bank;
  logic           wr_en;
  logic [PAW-1:0] wr_addr;

  bp_ctrl #(.IMG(IMG), .NPROJ(NPROJ), .NPAR(NPAR)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .set_idx(set_idx), .fg(fg), .pf_start(pf_start), .pf_set(pf_set), .pf_busy(pf_busy),
    .en(en), .iss_valid(iss_valid), .iss_first_col(iss_first_col), .iss_first_row(iss_first_row),
    .rd_restart(rd_restart), .rd_avail(rd_avail), .rd_pop(rd_pop),
    .acc_zero(acc_zero), .src_bank(src_bank), .acc_we(wr_en), .acc_waddr(wr_addr),
    .stall(stall), .pf_wait(pf_wait));

  assign result_bank = ~src_bank;

  // ---------------- sinogram prefetch ----------------
  logic [NPAR-1:0] pf_en;
  logic [BAW-1:0]  pf_addr;
  logic [SW-1:0]   pf_even [NPAR];
  logic [SW-1:0]   pf_odd  [NPAR];

  sino_prefetch #(.NPAR(NPAR), .NDET(NDET), .NSETS(NSETS), .NBANK(NBANK), .PPW(PPW),
                  .MEM_RD_LAT(MEM_RD_LAT), .SIN_AW(SIN_AW)) u_prefetch (
    .clk(clk), .rst_n(rst_n), .start(pf_start), .set_idx(pf_set), .busy(pf_busy), .done(pf_done),
    .sin_addr(sin_addr), .sin_re(sin_re), .sin_rdata(sin_rdata),
    .pf_en(pf_en), .pf_addr(pf_addr), .pf_even(pf_even), .pf_odd(pf_odd));

  // ---------------- lanes ----------------
  logic signed [CW-1:0] contrib [NPAR];

  for (genvar l = 0; l < NPAR; l++) begin : g_lane
    bp_lane #(.NDET(NDET), .NSETS(NSETS)) u_lane (
      .clk(clk), .en(en),
      .lut_we(lut_we && (lut_lane == LW'(l))), .lut_sel(lut_sel), .lut_idx(lut_idx),
      .lut_wdata(lut_wdata), .set_idx(set_idx),
      .iss_valid(iss_valid), .iss_first_col(iss_first_col), .iss_first_row(iss_first_row),
      .fg(fg), .pf_en(pf_en[l]), .pf_addr(pf_addr), .pf_even(pf_even[l]), .pf_odd(pf_odd[l]),
      .contrib(contrib[l]));
  end

  // ---------------- accumulation ----------------
  logic [PAW-1:0]          rd_addr;
  logic                    rd_re;
  logic signed [ACC_W-1:0] rd_head, sum;

  accum_reader #(.MEM_RD_LAT(MEM_RD_LAT), .AW(PAW), .NPIX(IMG * IMG), .DEPTH(MEM_RD_LAT + 4)) u_reader (
    .clk(clk), .rst_n(rst_n), .restart(rd_restart),
    .acc_addr(rd_addr), .acc_re(rd_re), .acc_rdata(signed'(acc_rdata[src_bank])),
    .out_valid(rd_avail), .out_data(rd_head), .pop(rd_pop));

  acc_tree #(.NPAR(NPAR)) u_tree (
    .clk(clk), .en(en), .contrib(contrib), .acc_in(rd_head), .acc_zero(acc_zero), .sum(sum));

  for (genvar b = 0; b < 2; b++) begin : g_acc
    assign acc_addr[b]  = (src_bank == 1'(b)) ? rd_addr : wr_addr;
    assign acc_re[b]    = (src_bank == 1'(b)) && rd_re;
    assign acc_we[b]    = (src_bank != 1'(b)) && wr_en;
    assign acc_wdata[b] = sum;
  end

  // The controller only uses the prefetch's busy level; its done pulse must
  // come with busy already low, or the controller could miss the end of a load.
  a_pf_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
    pf_done |-> !pf_busy);

endmodule
