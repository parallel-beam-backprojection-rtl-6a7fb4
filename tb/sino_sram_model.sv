// sino_sram_model - behavioural model of one external input (sinogram) SRAM
// bank, holding the filtered sinogram in the engine's prefetch layout.
//
// Not design logic. Instead of storing the sinogram, each word is computed
// from its address: for bank BANK, word a = s*LOADCYC + k holds, for
// m = 0..PPW-1, the pair {sample(p, 2j+1), sample(p, 2j)} of projection
// p = s*NPAR + g*NBANK*PPW + BANK*PPW + m, with g = k / (NDET/2) and
// j = k mod (NDET/2). Read latency is LAT clocks, like zbt_sram_model.
// The memories are the board's; their latency and word layout are this
// design's assumptions.
module sino_sram_model
  import tb_bp_pkg::*;
#(
  parameter int NPAR  = 16,
  parameter int NDET  = 1024,
  parameter int NBANK = 2,
  parameter int PPW   = 2,
  parameter int BANK  = 0,
  parameter int AW    = 20,
  parameter int LAT   = 2,
  localparam int DW = PPW * 18
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          re,
  output logic [DW-1:0] rdata
);

  localparam int HALF    = NDET / 2;
  localparam int PPC     = NBANK * PPW;
  localparam int LOADCYC = NPAR * HALF / PPC;

  logic [DW-1:0] pipe [LAT];

  function automatic logic [DW-1:0] word_at(int a);
    logic [DW-1:0] w;
    int s, k, g, j, p;
    s = a / LOADCYC;
    k = a % LOADCYC;
    g = k / HALF;
    j = k % HALF;
    for (int m = 0; m < PPW; m++) begin
      p = s * NPAR + g * PPC + BANK * PPW + m;
      w[18*m +: 9]     = 9'(sample(p, 2 * j, NDET));
      w[18*m + 9 +: 9] = 9'(sample(p, 2 * j + 1, NDET));
    end
    return w;
  endfunction

  always_ff @(posedge clk) begin
    pipe[0] <= re ? word_at(int'(addr)) : '0;
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign rdata = pipe[LAT-1];

endmodule
