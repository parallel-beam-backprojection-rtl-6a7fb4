// tb_bp_pkg - test data and reference arithmetic for the backprojection
// testbenches.
//
// sample(): a deterministic pseudo-random 9-bit filtered-projection code for
//   projection p, detector i (an integer hash, so no table is stored).
// lut1/lut2/lut3(): the look-up table entries for projection p of nproj over
//   180 degrees, for an img x img image and ndet detectors with
//   D = ndet / (sqrt(2) * img) detector spacings per pixel, detector axis
//   centred at ndet/2 - 1/2, pixel (r, c) at x = c - (img-1)/2,
//   y = (img-1)/2 - r:
//     LUT1 = round(32 * t(-1, -1))             (AI.5, wraps mod 2^(AI+5))
//     LUT2 = round(2^15 * D * sin(theta))      (1.15)
//     LUT3 = round(2^15 * D * cos(theta))      (2.15, two's complement)
//   where t(r, c) = ndet/2 - 1/2 + D*(x cos(theta) + y sin(theta)).
// ref_contrib(): one projection's contribution to pixel (r, c), computed from
//   the closed form addr = LUT1*2^10 - (r+1)*LUT2 + (c+1)*LUT3 (not the
//   incremental hardware walk), rounded factor min(15, (f5 + 1) / 2) with f5
//   the top five fraction bits, and (P[i+1]-P[i])*IF + 16*P[i].
// The formats, rounding and interpolation formula follow the document; the
// geometry conventions and the test data are this design's choices.
package tb_bp_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int unsigned hash32(int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic int sample(int p, int i, int ndet);
    return int'(hash32(32'(p * ndet + i) ^ 32'h5a5a1234) & 32'h1ff);
  endfunction

  function automatic int clog2i(int n);
    int l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  function automatic real dratio(int img, int ndet);
    return real'(ndet) / ($sqrt(2.0) * real'(img));
  endfunction

  function automatic real theta(int p, int nproj);
    return PI * real'(p) / real'(nproj);
  endfunction

  function automatic longint lut1(int p, int nproj, int img, int ndet);
    real d, m, t;
    longint q;
    d = dratio(img, ndet);
    m = real'(img - 1) / 2.0;
    t = real'(ndet) / 2.0 - 0.5
        + d * ((-1.0 - m) * $cos(theta(p, nproj)) + (m + 1.0) * $sin(theta(p, nproj)));
    q = longint'($floor(t * 32.0 + 0.5));
    return q & ((longint'(1) << (clog2i(ndet) + 5)) - 1);
  endfunction

  function automatic longint lut2(int p, int nproj, int img, int ndet);
    return longint'($floor(dratio(img, ndet) * $sin(theta(p, nproj)) * 32768.0 + 0.5));
  endfunction

  function automatic longint lut3(int p, int nproj, int img, int ndet);
    longint q;
    q = longint'($floor(dratio(img, ndet) * $cos(theta(p, nproj)) * 32768.0 + 0.5));
    return q & 64'h1ffff;
  endfunction

  // statistics of the reference walk
  int unsigned n_sat;    // factors that saturated
  int unsigned n_odd;    // odd integer part (swap in the other direction)
  int unsigned n_even;

  function automatic int ref_contrib(int p, int r, int c, int nproj, int img, int ndet);
    int ai;
    longint aw_mask, a, l3;
    int idx, f5, ifac, p0, p1;
    ai = clog2i(ndet);
    aw_mask = (longint'(1) << (ai + 15)) - 1;
    l3 = lut3(p, nproj, img, ndet);
    if (l3 >= 65536) l3 = l3 - 131072;
    a = (lut1(p, nproj, img, ndet) << 10) - longint'(r + 1) * lut2(p, nproj, img, ndet)
        + longint'(c + 1) * l3;
    a = a & aw_mask;
    idx = int'(a >> 15);
    f5 = int'((a >> 10) & 31);
    ifac = (f5 + 1) / 2;
    if (ifac > 15) begin
      ifac = 15;
      n_sat++;
    end
    if (idx % 2 == 1) n_odd++; else n_even++;
    p0 = sample(p, idx, ndet);
    p1 = sample(p, (idx + 1) % ndet, ndet);
    return (p1 - p0) * ifac + 16 * p0;
  endfunction

endpackage
