// addr_demux - stage 3: even/odd projection RAM address formation.
//
// A projection of 2^AI samples is held in two on-chip RAMs: sample k sits in
// the even RAM at k/2 when k is even and in the odd RAM at (k-1)/2 when k is
// odd. Linear interpolation needs samples i and i+1 in the same clock, one of
// which is always even and the other odd, so both RAMs are read at once:
//     even RAM address = (i+1) >> 1      odd RAM address = i >> 1
// The parity of i is passed on so the swap unit of stage 4 can put sample i+1
// on the subtractor's first input. The split into two RAMs is the document's;
// the exact address formula is this design's reading of it. For
// i = 2^AI - 1 the even address wraps to 0 (that index is outside the image).
// Purely combinational. The odd address is a plain slice of the input.
module addr_demux #(
  parameter int AI = 10
) (
  input  logic [AI-1:0] idx,        // integer part of the spatial address
  output logic [AI-2:0] even_addr,
  output logic [AI-2:0] odd_addr,
  output logic          idx_odd     // i is odd
);

  // (i+1) >> 1 equals (i >> 1) + (i & 1)
  always_comb begin
    even_addr = idx[AI-1:1] + (AI-1)'(idx[0]);
    odd_addr  = idx[AI-1:1];
    idx_odd   = idx[0];
  end

endmodule
