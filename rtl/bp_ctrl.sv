// bp_ctrl - control unit of the backprojection engine.
//
// Sequences a reconstruction of NPROJ projections, NPAR at a time (a
// "projection set", NSETS = NPROJ/NPAR sets):
//   IDLE   -> start: prefetch set 0 into the background buffers      (LOAD0)
//   LOAD0  -> prefetch done: swap buffers, start prefetch of set 1    (SETUP)
//   SETUP  -> one clock for the LUTs to present the set's entries     (RUN)
//   RUN    -> issue the IMG x IMG pixels in raster order, one per clock
//             while the pipeline advances                             (DRAIN)
//   DRAIN  -> wait until no pixel is left in the pipeline; then done
//             after the last set, otherwise                            (SWAP)
//   SWAP   -> wait for the prefetch of the next set if it is still
//             running, swap the projection buffers and the roles of the
//             two accumulation RAMs, start the following prefetch     (SETUP)
// It also owns the pipeline's valid bits (stages 1-7) and the stall: en
// drops when the accumulation stage (stage 6 for NPAR <= 4, stage 7 above)
// holds a pixel whose previous sum has not yet come back from the source
// accumulation RAM. Set s reads accumulation bank s mod 2 and writes the
// other bank; during set 0 the previous sum is taken as zero. Writes go to
// consecutive addresses from 0, in the order pixels leave stage 7.
//
// What follows the document: raster order, one pixel per clock, overlapped
// prefetch, buffer and RAM role swaps per set, the stall at the start of a
// set. This design's choices: draining the pipeline between sets, the
// start/busy/done handshake, the zero previous sum in set 0.
//
// rst_n is an asynchronous reset. The assertions also use it to switch
// themselves off during reset, so a lint tool reports rst_n as used both
// asynchronously and synchronously; that use is intended.
module bp_ctrl
  import bp_pkg::*;
#(
  parameter int IMG   = 512,
  parameter int NPROJ = 1024,
  parameter int NPAR  = 16,
  localparam int NSETS = NPROJ / NPAR,
  localparam int SAW   = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int CRW   = (IMG > 1) ? $clog2(IMG) : 1,
  localparam int PAW   = $clog2(IMG * IMG),
  localparam bit ACC_IN_S7 = tree_levels(NPAR) > s6_levels(NPAR)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // projection set and buffers
  output logic [SAW-1:0] set_idx,
  output logic           fg,
  output logic           pf_start,
  output logic [SAW-1:0] pf_set,
  input  logic           pf_busy,
  // pixel issue and pipeline advance
  output logic           en,
  output logic           iss_valid,
  output logic           iss_first_col,
  output logic           iss_first_row,
  // accumulation RAMs
  output logic           rd_restart,
  input  logic           rd_avail,
  output logic           rd_pop,
  output logic           acc_zero,
  output logic           src_bank,    // bank read in this set
  output logic           acc_we,      // write to bank !src_bank
  output logic [PAW-1:0] acc_waddr,
  // status
  output logic           stall,       // pipeline waits for accumulation data
  output logic           pf_wait      // pipeline waits for the prefetch
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD0, S_SETUP, S_RUN, S_DRAIN, S_SWAP} state_e;
  state_e state;

  logic [CRW-1:0] row, col;
  logic [7:1]     v;          // v[k]: stage-k register holds a valid pixel
  logic           vacc;
  logic           last_pix;

  assign iss_valid     = (state == S_RUN);
  assign iss_first_col = (col == '0);
  assign iss_first_row = (row == '0);
  assign vacc          = ACC_IN_S7 ? v[6] : v[5];
  assign en            = !(vacc && !rd_avail);
  assign rd_pop        = vacc && en;
  assign acc_we        = v[7] && en;
  assign acc_zero      = (set_idx == '0);
  assign src_bank      = set_idx[0];
  assign last_pix      = (row == CRW'(IMG - 1)) && (col == CRW'(IMG - 1));
  assign stall         = (state == S_RUN || state == S_DRAIN) && !en;
  assign pf_wait       = (state == S_SWAP) && pf_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      busy       <= 1'b0;
      done       <= 1'b0;
      set_idx    <= '0;
      fg         <= 1'b1;
      pf_start   <= 1'b0;
      pf_set     <= '0;
      rd_restart <= 1'b0;
      row        <= '0;
      col        <= '0;
      v          <= '0;
      acc_waddr  <= '0;
    end else begin
      done       <= 1'b0;
      pf_start   <= 1'b0;
      rd_restart <= 1'b0;
      if (en) v <= {v[6:1], iss_valid};
      if (acc_we) acc_waddr <= acc_waddr + PAW'(1);

      unique case (state)
        S_IDLE: if (start) begin
          busy     <= 1'b1;
          set_idx  <= '0;
          fg       <= 1'b1;          // prefetch fills buffer !fg = 0
          pf_set   <= '0;
          pf_start <= 1'b1;
          state    <= S_LOAD0;
        end
        S_LOAD0: if (!pf_busy && !pf_start) begin
          fg <= ~fg;
          if (NSETS > 1) begin
            pf_set   <= SAW'(1);
            pf_start <= 1'b1;
          end
          rd_restart <= 1'b1;
          acc_waddr  <= '0;
          state      <= S_SETUP;
        end
        S_SETUP: begin
          row   <= '0;
          col   <= '0;
          state <= S_RUN;
        end
        S_RUN: if (en) begin
          col <= col + CRW'(1);
          if (col == CRW'(IMG - 1)) begin
            col <= '0;
            row <= row + CRW'(1);
          end
          if (last_pix) state <= S_DRAIN;
        end
        S_DRAIN: if (v == '0) begin
          if (set_idx == SAW'(NSETS - 1)) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_SWAP;
          end
        end
        S_SWAP: if (!pf_busy && !pf_start) begin
          fg      <= ~fg;
          set_idx <= set_idx + SAW'(1);
          if (32'(set_idx) + 2 < NSETS) begin
            pf_set   <= set_idx + SAW'(2);
            pf_start <= 1'b1;
          end
          rd_restart <= 1'b1;
          acc_waddr  <= '0;
          state      <= S_SETUP;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Buffers and bank roles only change with the pipeline empty.
  a_swap_empty: assert property (@(posedge clk) disable iff (!rst_n)
    $changed(fg) |-> (v == '0));
  a_no_stall_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE) |-> en);

endmodule
