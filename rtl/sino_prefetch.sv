// sino_prefetch - sinogram data feeding flow.
//
// Copies the NPAR filtered projections of one projection set from the
// external input SRAM banks into the background half of every lane's
// projection buffer. It runs while the pipeline processes the current set, so
// the next set is ready when the current one ends; only the first set is
// loaded with the pipeline idle.
//
// Memory layout (this design's choice; the document only says that a word
// holds consecutive samples): each of the NBANK banks delivers one word per
// clock holding PPW sample pairs, a pair being {odd sample, even sample}
// (2*SW bits, even sample in the low half, pair m at bits [2*SW*m +: 2*SW]).
// PPC = NBANK*PPW pairs arrive per clock. For set s the prefetch reads
// LOADCYC = NPAR*(NDET/2)/PPC words from every bank, at word addresses
// s*LOADCYC + k. Load cycle k serves lane group g = k / (NDET/2) and pair
// index j = k mod (NDET/2); bank b, pair m goes to lane g*PPC + b*PPW + m.
// With 16 lanes, 1024 detectors, 2 banks and 2 pairs per 36-bit word this is
// the 2048-cycle load of the document; with 1 lane, 1 bank, 1 pair per word
// it is the 512-cycle load of the non-parallel version.
//
// Timing: start (one clock, while idle) begins a load of set set_idx. Reads
// are issued one per clock; data return MEM_RD_LAT clocks later and are
// written with the delayed load index (the write counter). busy stays high
// until the last pair is written; done pulses in the clock after that write.
// The sample outputs pf_even/pf_odd are plain slices of the read data; only
// pf_en and pf_addr tell each lane when and where to write them.
module sino_prefetch
  import bp_pkg::*;
#(
  parameter int NPAR       = 16,
  parameter int NDET       = 1024,
  parameter int NSETS      = 64,
  parameter int NBANK      = 2,
  parameter int PPW        = 2,
  parameter int MEM_RD_LAT = 2,
  parameter int SIN_AW     = 20,
  localparam int PPC     = NBANK * PPW,
  localparam int HALF    = NDET / 2,
  localparam int BAW     = $clog2(HALF),
  localparam int LOADCYC = NPAR * HALF / PPC,
  localparam int KW      = (LOADCYC > 1) ? $clog2(LOADCYC) : 1,
  localparam int SAW     = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int WW      = PPW * 2 * SW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [SAW-1:0] set_idx,
  output logic           busy,
  output logic           done,
  // input SRAM banks (read only)
  output logic [SIN_AW-1:0] sin_addr  [NBANK],
  output logic              sin_re    [NBANK],
  input  logic [WW-1:0]     sin_rdata [NBANK],
  // lane buffer writes
  output logic [NPAR-1:0]   pf_en,
  output logic [BAW-1:0]    pf_addr,
  output logic [SW-1:0]     pf_even [NPAR],
  output logic [SW-1:0]     pf_odd  [NPAR]
);

  initial begin
    assert (NPAR % PPC == 0) else $error("NPAR must be a multiple of NBANK*PPW");
    assert (MEM_RD_LAT >= 1) else $error("MEM_RD_LAT must be at least 1");
  end

  logic          issuing;
  logic [KW-1:0] k;
  logic [SIN_AW-1:0] base;

  // delay line tracking reads in flight
  logic          dv [MEM_RD_LAT];
  logic [KW-1:0] dk [MEM_RD_LAT];

  logic last_issue;
  assign last_issue = issuing && (k == KW'(LOADCYC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      k       <= '0;
      base    <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      for (int i = 0; i < MEM_RD_LAT; i++) dv[i] <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        issuing <= 1'b1;
        busy    <= 1'b1;
        k       <= '0;
        base    <= SIN_AW'(set_idx) * SIN_AW'(LOADCYC);
      end else if (issuing) begin
        k <= k + KW'(1);
        if (last_issue) issuing <= 1'b0;
      end
      dv[0] <= issuing;
      for (int i = 1; i < MEM_RD_LAT; i++) dv[i] <= dv[i-1];
      // the last write happens when the final read's data return
      if (busy && !issuing && !(start && !busy)) begin
        if (dv[MEM_RD_LAT-1] && dk[MEM_RD_LAT-1] == KW'(LOADCYC - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    dk[0] <= k;
    for (int i = 1; i < MEM_RD_LAT; i++) dk[i] <= dk[i-1];
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    assign sin_addr[b] = base + SIN_AW'(k);
    assign sin_re[b]   = issuing;
  end

  // write side: route the returning pairs to their lanes
  logic          wv;
  logic [KW-1:0] wk;
  int unsigned   grp;
  assign wv  = dv[MEM_RD_LAT-1];
  assign wk  = dk[MEM_RD_LAT-1];
  assign grp = 32'(wk) / HALF;
  assign pf_addr = BAW'(wk);

  for (genvar l = 0; l < NPAR; l++) begin : g_lane
    localparam int Q = l % PPC;
    localparam int B = Q / PPW;
    localparam int M = Q % PPW;
    assign pf_en[l]   = wv && (grp == (l / PPC));
    assign pf_even[l] = sin_rdata[B][2*SW*M +: SW];
    assign pf_odd[l]  = sin_rdata[B][2*SW*M + SW +: SW];
  end

endmodule
