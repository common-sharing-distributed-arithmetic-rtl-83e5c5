// Reference model of the multi-standard transforms, for the testbenches.
//
// Written independently of the RTL datapath: the full 8x8 (or 4x4) matrix of
// each standard is built from the cosine index of each entry, the
// distributed-arithmetic terms are formed straight from the matrix entries,
// and the error-compensated truncation of the adder tree is evaluated with
// plain integer arithmetic.
package mst_ref_pkg;
  import mst_pkg::*;

  // Coefficient magnitudes Ck of each standard (k = 1..7).
  function automatic int ref_c(mode_e m, int k);
    int t [5][8];
    t[0] = '{0, 126, 118, 106, 91, 71, 49, 25};  // MPEG DCT, Q8 of cos(k pi/16)/2
    t[1] = '{0, 12, 8, 10, 8, 6, 4, 3};          // H.264 8-point
    t[2] = '{0, 16, 16, 15, 12, 9, 6, 4};        // VC-1 8-point
    t[3] = '{0, 0, 2, 0, 1, 0, 1, 0};            // H.264 4-point
    t[4] = '{0, 0, 22, 0, 17, 0, 10, 0};         // VC-1 4-point
    return t[int'(m)][k];
  endfunction

  function automatic int ref_shift(mode_e m);
    int s [5];
    s = '{8, 5, 5, 1, 5};
    return s[int'(m)];
  endfunction

  function automatic bit ref_four(mode_e m);
    return (m == MODE_H264_4) || (m == MODE_VC1_4);
  endfunction

  // Signed entry (k, n) of an N-point matrix (N = 8 or 4):
  // sign(cos((2n+1) k pi / 2N)) * C_idx, with C4 on the DC row.
  function automatic int ref_m(mode_e m, int N, int k, int n);
    int a;
    if (k == 0) return ref_c(m, 4);
    a = ((2*n + 1) * k * (8 / N)) % 32;
    if (a > 16) a = 32 - a;
    if (a > 8) return -ref_c(m, 16 - a);
    return ref_c(m, a);
  endfunction

  // Bit-level model of one ECAT output from its terms d[0..6].
  function automatic longint ref_ecat(longint d [7], int s, int ow);
    longint sum, lim;
    int pop, ntr;
    sum = 0; pop = 0; ntr = 0;
    for (int w = 0; w < 7; w++) begin
      if (w >= s) sum += d[w] * (longint'(1) << (w - s));
      else begin
        sum += d[w] >>> (s - w);
        pop += int'((d[w] >>> (s - 1 - w)) & 1);
        ntr++;
      end
    end
    sum += (pop + ntr / 2 + 1) / 2;
    lim = longint'(1) << (ow - 1);
    if (sum > lim - 1) sum = lim - 1;
    if (sum < -lim) sum = -lim;
    return sum;
  endfunction

  // One 1-D pass on 8 samples: bit-exact result of the core.
  function automatic void ref_1d(mode_e m, longint x [8], int ow, output longint y [8]);
    int N, base, s;
    longint d [7];
    longint v;
    N = ref_four(m) ? 4 : 8;
    s = ref_shift(m);
    for (int blk = 0; blk < 8 / N; blk++) begin
      base = blk * N;
      for (int k = 0; k < N; k++) begin
        for (int w = 0; w < 7; w++) begin
          d[w] = 0;
          for (int n = 0; n < N; n++) begin
            v = ref_m(m, N, k, n);
            if (((v < 0 ? -v : v) >> w) & 1) d[w] += (v < 0) ? -x[base+n] : x[base+n];
          end
        end
        y[base + k] = ref_ecat(d, s, ow);
      end
    end
  endfunction

  // Exact (unrounded) 1-D value times 2^shift, for error bounds.
  function automatic longint ref_exact(mode_e m, longint x [8], int k8);
    int N, base, k;
    longint acc;
    N = ref_four(m) ? 4 : 8;
    base = (k8 / N) * N;
    k = k8 % N;
    acc = 0;
    for (int n = 0; n < N; n++) acc += ref_m(m, N, k, n) * x[base + n];
    return acc;
  endfunction
endpackage
