// proj_buffer - double-buffered on-chip projection store of one lane.
//
// Two buffer sets, each made of an even RAM and an odd RAM of NDET/2 words of
// W bits (512 x 9 for 1024 detectors). The foreground set (index fg) serves
// the pipeline: both of its RAMs are read in the same clock, giving the two
// neighbouring samples that linear interpolation needs. The background set
// (index !fg) is filled by the prefetch with the lane's next projection, one
// even/odd sample pair per write. When a projection set is finished the
// control unit flips fg and the roles swap. The output multiplexer is the MUX
// of stage 4 in the document's datapath.
//
// Timing: reads are synchronous (address on re, data one clock later, held
// while re is low); the output multiplexer uses fg registered with the read.
// fg must only change while no read is in flight.
module proj_buffer
  import bp_pkg::*;
#(
  parameter int NDET = 1024,
  parameter int W    = SW,
  localparam int DEPTH = NDET / 2,
  localparam int BAW   = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           fg,          // foreground set read by the pipeline
  // background write (prefetch)
  input  logic           wr_en,
  input  logic [BAW-1:0] wr_addr,
  input  logic [W-1:0]   wr_even,     // sample 2*wr_addr
  input  logic [W-1:0]   wr_odd,      // sample 2*wr_addr + 1
  // foreground read (pipeline stage 3/4)
  input  logic           rd_en,
  input  logic [BAW-1:0] rd_addr_even,
  input  logic [BAW-1:0] rd_addr_odd,
  output logic [W-1:0]   rd_even,
  output logic [W-1:0]   rd_odd
);

  logic [W-1:0] q_even [2];
  logic [W-1:0] q_odd  [2];
  logic         fg_q;

  for (genvar s = 0; s < 2; s++) begin : g_set
    sdp_ram #(.DEPTH(DEPTH), .WIDTH(W)) u_even (
      .clk   (clk),
      .we    (wr_en && (fg != 1'(s))),
      .waddr (wr_addr),
      .wdata (wr_even),
      .re    (rd_en && (fg == 1'(s))),
      .raddr (rd_addr_even),
      .rdata (q_even[s])
    );
    sdp_ram #(.DEPTH(DEPTH), .WIDTH(W)) u_odd (
      .clk   (clk),
      .we    (wr_en && (fg != 1'(s))),
      .waddr (wr_addr),
      .wdata (wr_odd),
      .re    (rd_en && (fg == 1'(s))),
      .raddr (rd_addr_odd),
      .rdata (q_odd[s])
    );
  end

  always_ff @(posedge clk) begin
    if (rd_en) fg_q <= fg;
  end

  assign rd_even = q_even[fg_q];
  assign rd_odd  = q_odd[fg_q];

endmodule
