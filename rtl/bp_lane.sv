// bp_lane - one projection lane of the backprojection pipeline.
//
// A lane backprojects one projection of the current set into the pixel that
// is flowing through the pipeline. It holds:
//   * its slice of LUTs 1-3: entry s is for projection s*NPAR + lane, so the
//     NPAR lanes together store the tables of all projections;
//   * stage 1 (sag_col) and stage 2 (sag_row): spatial address of the pixel;
//   * stage 3: if_round (interpolation factor) and addr_demux (even/odd RAM
//     addresses), which feed the synchronous RAM reads;
//   * stage 4: proj_buffer output multiplexer and sample_swap, registered;
//   * stage 5 and the first adder of stage 6: lin_interp.
// The output contrib is the lane's 15-bit contribution to the pixel, valid
// combinationally in stage 6 (six clocks after the pixel was issued into
// stage 1 when en stays high). All registers advance only when en is high, so
// the controller can stall the whole pipeline. The controller tracks which
// stage holds a valid pixel; the lane itself only needs the issue flags.
//
// The LUTs are written by the host through lut_we/lut_sel/lut_idx/lut_wdata
// while the engine is idle (the document says they are pre-computed, not how
// they are loaded). The LUT index set_idx must be stable for one clock before
// the first pixel of a set is issued.
//
// Of the 15 fraction bits of the spatial address only the top five feed the
// rounding; the lower ten are kept so that the row and pixel steps accumulate
// at full precision, and are otherwise unused (a lint tool reports them).
module bp_lane
  import bp_pkg::*;
#(
  parameter int NDET  = 1024,  // detectors per projection
  parameter int NSETS = 64,    // projections handled by this lane
  localparam int AI  = $clog2(NDET),
  localparam int AW  = AI + FRAC,
  localparam int BAW = AI - 1,
  localparam int SAW = (NSETS > 1) ? $clog2(NSETS) : 1
) (
  input  logic           clk,
  input  logic           en,            // pipeline advance (low = stall)
  // LUT load port
  input  logic           lut_we,
  input  lut_sel_e       lut_sel,
  input  logic [SAW-1:0] lut_idx,
  input  logic [L3_W-1:0] lut_wdata,
  // current projection set
  input  logic [SAW-1:0] set_idx,
  // pixel issue into stage 1
  input  logic           iss_valid,
  input  logic           iss_first_col,
  input  logic           iss_first_row,
  // projection buffers
  input  logic           fg,
  input  logic           pf_en,
  input  logic [BAW-1:0] pf_addr,
  input  logic [SW-1:0]  pf_even,
  input  logic [SW-1:0]  pf_odd,
  // stage-6 contribution
  output logic signed [CW-1:0] contrib
);

  // ---------------- LUTs ----------------
  logic [AI+L1_FRAC-1:0] lut1;
  logic [L2_W-1:0]       lut2;
  logic [L3_W-1:0]       lut3;

  sdp_ram #(.DEPTH(NSETS), .WIDTH(AI + L1_FRAC)) u_lut1 (
    .clk(clk), .we(lut_we && lut_sel == LUT_START), .waddr(lut_idx),
    .wdata(lut_wdata[AI+L1_FRAC-1:0]), .re(1'b1), .raddr(set_idx), .rdata(lut1));
  sdp_ram #(.DEPTH(NSETS), .WIDTH(L2_W)) u_lut2 (
    .clk(clk), .we(lut_we && lut_sel == LUT_ROW), .waddr(lut_idx),
    .wdata(lut_wdata[L2_W-1:0]), .re(1'b1), .raddr(set_idx), .rdata(lut2));
  sdp_ram #(.DEPTH(NSETS), .WIDTH(L3_W)) u_lut3 (
    .clk(clk), .we(lut_we && lut_sel == LUT_COL), .waddr(lut_idx),
    .wdata(lut_wdata), .re(1'b1), .raddr(set_idx), .rdata(lut3));

  // ---------------- stage 1 ----------------
  logic [AW-1:0] col_addr;
  logic          v1, fc1;

  sag_col #(.AI(AI)) u_sag_col (
    .clk(clk), .en(en), .row_start(iss_valid && iss_first_col),
    .first_row(iss_first_row), .lut1(lut1), .lut2(lut2), .col_addr(col_addr));

  always_ff @(posedge clk) begin
    if (en) begin
      v1  <= iss_valid;
      fc1 <= iss_first_col;
    end
  end

  // ---------------- stage 2 ----------------
  logic [AW-1:0] addr;

  sag_row #(.AI(AI)) u_sag_row (
    .clk(clk), .en(en), .valid_in(v1), .first_col(fc1),
    .col_addr(col_addr), .lut3(signed'(lut3)), .addr(addr));

  // ---------------- stage 3 ----------------
  logic [BAW-1:0] ea, oa;
  logic           odd3, odd4;
  logic [IFW-1:0] if3, if4;

  addr_demux #(.AI(AI)) u_demux (
    .idx(addr[AW-1 -: AI]), .even_addr(ea), .odd_addr(oa), .idx_odd(odd3));

  if_round #(.W(IFW)) u_round (
    .frac_hi(addr[FRAC-1 -: IFW+1]), .factor(if3));

  always_ff @(posedge clk) begin
    if (en) begin
      odd4 <= odd3;
      if4  <= if3;
    end
  end

  // ---------------- stage 4 ----------------
  logic [SW-1:0] q_even, q_odd, sw1, sw2;
  logic [SW-1:0] in1_q, in2_q;
  logic [IFW-1:0] if5;

  proj_buffer #(.NDET(NDET), .W(SW)) u_buf (
    .clk(clk), .fg(fg),
    .wr_en(pf_en), .wr_addr(pf_addr), .wr_even(pf_even), .wr_odd(pf_odd),
    .rd_en(en), .rd_addr_even(ea), .rd_addr_odd(oa),
    .rd_even(q_even), .rd_odd(q_odd));

  sample_swap #(.W(SW)) u_swap (
    .idx_odd(odd4), .even_val(q_even), .odd_val(q_odd), .in1(sw1), .in2(sw2));

  always_ff @(posedge clk) begin
    if (en) begin
      in1_q <= sw1;
      in2_q <= sw2;
      if5   <= if4;
    end
  end

  // ---------------- stages 5-6 ----------------
  lin_interp #(.W(SW), .F(IFW)) u_interp (
    .clk(clk), .en(en), .in1(in1_q), .in2(in2_q), .factor(if5), .contrib(contrib));

endmodule
