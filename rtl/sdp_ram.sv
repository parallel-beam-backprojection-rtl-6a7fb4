// sdp_ram - simple dual-port on-chip RAM (one write port, one read port).
//
// Used for the projection buffers and the look-up tables. Both ports are
// synchronous to clk. The read port registers its address when re is high and
// presents the word one clock later; while re is low the output holds, which
// lets a stalled pipeline keep its data. A read of the address being written
// in the same cycle returns the old word. Maps onto an FPGA block RAM.
// On-chip block RAMs for the buffers and tables are the document's; the
// hold-while-disabled read port is this design's choice for stalls.
module sdp_ram #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 9,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
