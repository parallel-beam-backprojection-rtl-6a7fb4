// accum_reader - data read flow of the accumulation RAM.
//
// Every pixel entering the pipeline needs its sum from the previous
// projection sets, which lives in the source accumulation RAM (an external
// SRAM with a read latency of several clocks). After restart this block reads
// the NPIX words of the source RAM in raster order from address 0, one per
// clock, marks each returning word valid after MEM_RD_LAT clocks with a delay
// line of valid bits, and keeps it in a FIFO until the accumulation adder
// pops it. Reads run ahead of the pixels on credits: at most DEPTH words are
// read and not yet popped, so the FIFO can never overflow, and with
// DEPTH >= MEM_RD_LAT + 2 the reads keep up with one pixel per clock. The
// pipeline stalls only while the accumulation stage holds a pixel and the
// FIFO is empty, i.e. at the start of a projection set when the first reads
// are still in flight. The document describes this stall and two registers
// that detect valid returning data; the credit FIFO, which makes any latency
// work, is this design's choice.
//
// Timing: restart (one clock) clears the address; reads start in the next
// clock. The word for a read is expected on acc_rdata MEM_RD_LAT clocks after
// acc_re/acc_addr are presented. out_valid/out_data show the FIFO head; pop
// removes it.
//
// rst_n is an asynchronous reset. The assertions also use it to switch
// themselves off during reset, so a lint tool reports rst_n as used both
// asynchronously and synchronously; that use is intended.
module accum_reader
  import bp_pkg::*;
#(
  parameter int MEM_RD_LAT = 2,
  parameter int AW         = 18,
  parameter int NPIX       = 1 << AW,  // words read per set
  parameter int DEPTH      = 8,
  localparam int PW = $clog2(DEPTH),
  localparam int CW_ = $clog2(DEPTH + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    restart,    // new set: read from address 0
  output logic [AW-1:0]           acc_addr,
  output logic                    acc_re,
  input  logic signed [ACC_W-1:0] acc_rdata,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out_data,
  input  logic                    pop
);

  logic [AW:0]   nread;       // reads issued in this set
  logic [CW_-1:0] credit;     // words read and not yet popped
  logic          dv [MEM_RD_LAT];

  logic signed [ACC_W-1:0] fifo [DEPTH];
  logic [PW-1:0]  wp, rp;
  logic [CW_-1:0] cnt;
  logic           push, do_pop, req;

  assign req       = !restart && (nread < (AW+1)'(NPIX)) && (credit < CW_'(DEPTH));
  assign acc_addr  = nread[AW-1:0];
  assign acc_re    = req;
  assign push      = dv[MEM_RD_LAT-1];
  assign do_pop    = pop && (cnt != 0);
  assign out_valid = (cnt != 0);
  assign out_data  = fifo[rp];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] x);
    return (x == PW'(DEPTH - 1)) ? '0 : x + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nread  <= (AW+1)'(NPIX);
      credit <= '0;
      wp     <= '0;
      rp     <= '0;
      cnt    <= '0;
      for (int i = 0; i < MEM_RD_LAT; i++) dv[i] <= 1'b0;
    end else begin
      if (restart)  nread <= '0;
      else if (req) nread <= nread + (AW+1)'(1);
      credit <= credit + CW_'(req) - CW_'(do_pop);
      dv[0] <= req;
      for (int i = 1; i < MEM_RD_LAT; i++) dv[i] <= dv[i-1];
      if (push)   wp <= inc(wp);
      if (do_pop) rp <= inc(rp);
      cnt <= cnt + CW_'(push) - CW_'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wp] <= acc_rdata;
  end

  // Credits bound the words in flight plus those waiting in the FIFO.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (cnt < CW_'(DEPTH) || do_pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> out_valid);

endmodule
