// bp_env - host and memory environment for one bp_top instance.
//
// Plays the host and the board: drives reset, writes the LUTs of every lane
// (values from tb_bp_pkg), pulses start and waits for done, while the
// external SRAMs are modelled by sino_sram_model (NBANK input banks) and
// zbt_sram_model (two accumulation banks). Afterwards it reads the result
// bank and compares pixels with the closed-form reference of tb_bp_pkg:
// every pixel when NCHECK = 0, otherwise the four corners plus NCHECK random
// pixels. It also checks the pixel rate (one accumulation write per pixel per
// projection set) and the total cycle count, and counts the events the
// testbench must see: pipeline stalls, prefetch waits, prefetch cycles that
// overlap processing, and writes into each accumulation bank.
// The cycle bounds follow the document's one pixel per clock; the host
// protocol and the test data are this design's own.
module bp_env
  import bp_pkg::*;
  import tb_bp_pkg::*;
#(
  parameter int IMG        = 512,
  parameter int NDET       = 1024,
  parameter int NPROJ      = 1024,
  parameter int NPAR       = 16,
  parameter int NBANK      = 2,
  parameter int PPW        = 2,
  parameter int MEM_RD_LAT = 2,
  parameter int SIN_AW     = 20,
  parameter int NCHECK     = 0,
  parameter longint MAXCYC = 64'd100_000_000,
  localparam int NSETS = NPROJ / NPAR,
  localparam int SAW   = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int LW    = (NPAR > 1) ? $clog2(NPAR) : 1,
  localparam int PAW   = $clog2(IMG * IMG),
  localparam int WW    = PPW * 2 * SW
) (
  input  logic              clk,
  output logic              rst_n,
  output logic              start,
  input  logic              busy,
  input  logic              done,
  input  logic              result_bank,
  output logic              lut_we,
  output lut_sel_e          lut_sel,
  output logic [LW-1:0]     lut_lane,
  output logic [SAW-1:0]    lut_idx,
  output logic [L3_W-1:0]   lut_wdata,
  input  logic [SIN_AW-1:0] sin_addr  [NBANK],
  input  logic              sin_re    [NBANK],
  output logic [WW-1:0]     sin_rdata [NBANK],
  input  logic [PAW-1:0]    acc_addr  [2],
  input  logic              acc_re    [2],
  input  logic              acc_we    [2],
  input  logic [ACC_W-1:0]  acc_wdata [2],
  output logic [ACC_W-1:0]  acc_rdata [2],
  input  logic              stall,
  input  logic              pf_wait,
  // results
  output int                checks,
  output int                failures,
  output logic              fin,
  output int                stall_events,
  output int                pfwait_cycles,
  output int                overlap_cycles,
  output int                bank_writes [2],
  output longint            cycles
);

  localparam int LOADCYC = NPAR * (NDET / 2) / (NBANK * PPW);

  // ---------------- memories ----------------
  for (genvar b = 0; b < NBANK; b++) begin : g_sin
    sino_sram_model #(.NPAR(NPAR), .NDET(NDET), .NBANK(NBANK), .PPW(PPW), .BANK(b),
                      .AW(SIN_AW), .LAT(MEM_RD_LAT)) u_mem (
      .clk(clk), .addr(sin_addr[b]), .re(sin_re[b]), .rdata(sin_rdata[b]));
  end
  for (genvar b = 0; b < 2; b++) begin : g_acc
    zbt_sram_model #(.AW(PAW), .DW(ACC_W), .LAT(MEM_RD_LAT)) u_mem (
      .clk(clk), .addr(acc_addr[b]), .re(acc_re[b]), .we(acc_we[b]),
      .wdata(acc_wdata[b]), .rdata(acc_rdata[b]));
  end

  // ---------------- event counters ----------------
  logic   stall_q;
  logic   running;
  longint cyc;

  always @(posedge clk) begin
    cyc     <= cyc + 1;
    stall_q <= stall;
    if (stall && !stall_q) stall_events <= stall_events + 1;
    if (pf_wait) pfwait_cycles <= pfwait_cycles + 1;
    if (sin_re[0] && (acc_we[0] || acc_we[1])) overlap_cycles <= overlap_cycles + 1;
    if (acc_we[0]) bank_writes[0] <= bank_writes[0] + 1;
    if (acc_we[1]) bank_writes[1] <= bank_writes[1] + 1;
    if (cyc > MAXCYC && !fin) begin
      $display("bp_env: watchdog expired after %0d cycles", cyc);
      failures <= failures + 1;
      fin      <= 1'b1;
    end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("bp_env FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint read_pixel(int r, int c, logic bank);
    logic [ACC_W-1:0] w;
    if (bank) w = g_acc[1].u_mem.mem[r * IMG + c];
    else      w = g_acc[0].u_mem.mem[r * IMG + c];
    return longint'(signed'(w));
  endfunction

  task automatic check_pixel(int r, int c, logic bank);
    longint exp = 0;
    for (int p = 0; p < NPROJ; p++) exp += longint'(ref_contrib(p, r, c, NPROJ, IMG, NDET));
    check($sformatf("pixel (%0d,%0d)", r, c), read_pixel(r, c, bank), exp);
  endtask

  // ---------------- host sequence ----------------
  initial begin
    longint t0, t1, tmax;
    checks = 0; failures = 0; fin = 1'b0;
    stall_events = 0; pfwait_cycles = 0; overlap_cycles = 0;
    bank_writes[0] = 0; bank_writes[1] = 0;
    cyc = 0; stall_q = 1'b0; running = 1'b0;
    rst_n = 1'b0; start = 1'b0; lut_we = 1'b0;
    lut_sel = LUT_START; lut_lane = '0; lut_idx = '0; lut_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // LUT load: projection s*NPAR + l goes to lane l, entry s
    for (int s = 0; s < NSETS; s++) begin
      for (int l = 0; l < NPAR; l++) begin
        int p;
        p = s * NPAR + l;
        for (int t = 0; t < 3; t++) begin
          @(negedge clk);
          lut_we   = 1'b1;
          lut_sel  = lut_sel_e'(t);
          lut_lane = LW'(l);
          lut_idx  = SAW'(s);
          lut_wdata = (t == 0) ? L3_W'(lut1(p, NPROJ, IMG, NDET))
                    : (t == 1) ? L3_W'(lut2(p, NPROJ, IMG, NDET))
                               : L3_W'(lut3(p, NPROJ, IMG, NDET));
        end
      end
    end
    @(negedge clk);
    lut_we = 1'b0;
    bank_writes[0] = 0; bank_writes[1] = 0;
    @(negedge clk);
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    check("busy after start", longint'(busy), 1);
    while (!done && !fin) @(negedge clk);
    t1 = cyc;
    cycles = t1 - t0;
    if (!fin) begin
      $display("bp_env: IMG=%0d NPROJ=%0d NPAR=%0d done after %0d cycles (stall events %0d, prefetch-wait cycles %0d)",
               IMG, NPROJ, NPAR, cycles, stall_events, pfwait_cycles);
      // one accumulation write per pixel per set
      check("accumulation writes", longint'(bank_writes[0] + bank_writes[1]),
            longint'(NSETS) * IMG * IMG);
      // rate: one pixel per clock, plus the first load and a short drain per set
      tmax = longint'(LOADCYC) + longint'(NSETS) * (IMG * IMG + 16 + 2 * MEM_RD_LAT) + 16
             + longint'(pfwait_cycles);
      checks++;
      if (cycles < longint'(LOADCYC) + longint'(NSETS) * IMG * IMG || cycles > tmax) begin
        failures++;
        $display("bp_env FAIL cycle count %0d outside [%0d, %0d]", cycles,
                 longint'(LOADCYC) + longint'(NSETS) * IMG * IMG, tmax);
      end
      check("result bank", longint'(result_bank), longint'(NSETS % 2 == 0 ? 0 : 1));
      check("idle after done", longint'(busy), 0);
      if (NCHECK == 0) begin
        for (int r = 0; r < IMG; r++)
          for (int c = 0; c < IMG; c++) check_pixel(r, c, result_bank);
      end else begin
        check_pixel(0, 0, result_bank);
        check_pixel(0, IMG - 1, result_bank);
        check_pixel(IMG - 1, 0, result_bank);
        check_pixel(IMG - 1, IMG - 1, result_bank);
        for (int n = 0; n < NCHECK; n++)
          check_pixel(int'($urandom_range(IMG - 1)), int'($urandom_range(IMG - 1)), result_bank);
      end
    end
    fin = 1'b1;
  end

endmodule
