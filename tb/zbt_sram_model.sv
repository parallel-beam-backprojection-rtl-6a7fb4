// zbt_sram_model - behavioural model of one external accumulation SRAM bank.
//
// Not synthesizable design logic: stands in for the off-chip synchronous
// SRAM. A write (we) stores wdata at addr on the clock edge. A read (re)
// samples addr on the clock edge and returns the word on rdata LAT clocks
// after the read was presented (a LAT-deep output pipeline), matching the
// engine's MEM_RD_LAT. Contents start at zero.
// The memories are the board's; their latency and word layout are this
// design's assumptions.
module zbt_sram_model #(
  parameter int AW  = 18,
  parameter int DW  = 25,
  parameter int LAT = 2
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          re,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [1 << AW];
  logic [DW-1:0] pipe [LAT];

  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    pipe[0] <= re ? mem[addr] : '0;
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign rdata = pipe[LAT-1];

endmodule
