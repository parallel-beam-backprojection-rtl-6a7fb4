// tb_bp_ctrl - control unit with modelled neighbours: a prefetch that stays
// busy a random 5..40 clocks per load, and accumulation data that is
// available on random clocks. For 3 sets of a 4x4 image it checks raster
// order and first-row/first-column flags of the issued pixels, one write
// per pixel per set to addresses 0..15, the set/bank/buffer roles, that
// prefetch of set s finished before set s is processed and the next load is
// started, that en only drops when the accumulation stage lacks data, and a
// single done pulse. Stalls and prefetch waits must both occur.
// The expected values follow the document's arithmetic and timing; the
// stimulus and parameter sizes are this testbench's own.
module tb_bp_ctrl;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int IMG = 4, NPROJ = 12, NPAR = 4, NSETS = 3;
  logic rst_n, start, busy, done, fg, pf_start, pf_busy, en, iss_valid, iss_first_col, iss_first_row;
  logic rd_restart, rd_avail, rd_pop, acc_zero, src_bank, acc_we, stall, pf_wait;
  logic [1:0] set_idx, pf_set;
  logic [3:0] acc_waddr;
  int checks = 0, failures = 0;

  bp_ctrl #(.IMG(IMG), .NPROJ(NPROJ), .NPAR(NPAR)) dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // prefetch model
  int pf_left, loading, loaded [NSETS];
  always @(posedge clk) begin
    if (!rst_n) begin pf_left <= 0; pf_busy <= 0; end
    else if (pf_start) begin
      chk(!pf_busy, "start while prefetch busy");
      pf_left <= $urandom_range(40, 5); pf_busy <= 1; loading <= int'(pf_set);
    end else if (pf_busy) begin
      if (pf_left == 1) begin pf_busy <= 0; loaded[loading] <= 1; end
      pf_left <= pf_left - 1;
    end
  end

  // observers
  int issued [NSETS], writes [NSETS], stalls, waits, dones, starts;
  int er, ec, s;
  logic last_fg;
  always @(posedge clk) if (rst_n) begin
    rd_avail <= 1'($urandom_range(3) != 0);
    if (stall) stalls++;
    if (pf_wait) waits++;
    if (done) dones++;
    if (pf_start) begin
      chk(int'(pf_set) == starts, "prefetch set order");
      starts++;
    end
    chk(en || !rd_avail, "stall with data available");
    chk(stall == !en, "stall flag");
    if (iss_valid && en) begin
      s = int'(set_idx);
      if (issued[s] == 0) begin
        chk(loaded[s] == 1, "set processed before its prefetch finished");
        if (s > 0) chk(fg != last_fg, "buffers swapped");
        last_fg = fg;
        er = 0; ec = 0;
      end
      chk(iss_first_col == (ec == 0) && iss_first_row == (er == 0), "raster flags");
      ec++;
      if (ec == IMG) begin ec = 0; er++; end
      issued[s]++;
    end
    if (acc_we) begin
      s = int'(set_idx);
      chk(int'(acc_waddr) == writes[s], "write address order");
      chk(acc_zero == (s == 0), "previous sum zero only in set 0");
      chk(src_bank == 1'(s % 2), "source bank");
      writes[s]++;
    end
  end

  initial begin
    rst_n = 0; start = 0; rd_avail = 1;
    stalls = 0; waits = 0; dones = 0; starts = 0;
    for (int s = 0; s < NSETS; s++) begin issued[s] = 0; writes[s] = 0; loaded[s] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    chk(busy, "busy after start");
    wait (done);
    repeat (5) @(negedge clk);
    for (int s = 0; s < NSETS; s++) begin
      chk(issued[s] == IMG * IMG, "pixels issued per set");
      chk(writes[s] == IMG * IMG, "writes per set");
    end
    chk(dones == 1 && !busy, "single done, idle after");
    chk(starts == NSETS, "one prefetch per set");
    chk(stalls > 0, "a stall occurred");
    chk(waits > 0, "a prefetch wait occurred");
    $display("stall cycles %0d, prefetch wait cycles %0d", stalls, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
