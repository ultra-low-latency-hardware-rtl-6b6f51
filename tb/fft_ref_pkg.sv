// fft_ref_pkg: reference models for the FFT testbenches.
//
//  * ref_twiddle   - the twiddle rule (round(2^(TW_W-1) * W_N^e), saturated,
//                    exponent 0 exact), recomputed here from $cos/$sin.
//  * ref_fft       - bit-exact model of the fixed-point radix-4 DIF FFT, written
//                    as plain loops over stages and groups on 64-bit integers.
//  * dft_real      - double-precision DFT used as the accuracy reference.
//  * nmse          - normalised mean square error of a result against the DFT.
//  * make_ofdm     - real-valued, Hermitian-symmetric multicarrier test frame.
// Model numbers: 0 = FS, 1 = SB-NC, 2 = SB-WC, 3 = SB-MNC.
package fft_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // Sign-extend the low w bits of v.
  function automatic longint wrap(longint v, int w);
    longint m = (longint'(1) << w) - 1;
    v = v & m;
    if (v[w-1]) v = v - (longint'(1) << w);
    return v;
  endfunction

  function automatic longint sat_round(real v, int tw_w);
    longint r = longint'(v);
    longint hi = (longint'(1) << (tw_w - 1)) - 1;
    longint lo = -(longint'(1) << (tw_w - 1));
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

  function automatic void ref_twiddle(int n, int tw_w, int e, output longint wr, output longint wi);
    real sc = 2.0 ** (tw_w - 1);
    if (e == 0) begin
      wr = longint'(1) << (tw_w - 1);
      wi = 0;
    end else begin
      wr = sat_round( $cos(2.0 * PI * e / n) * sc, tw_w);
      wi = sat_round(-$sin(2.0 * PI * e / n) * sc, tw_w);
    end
  endfunction

  // Shift right by sh (floor), optional compensation, keep w bits.
  function automatic longint scale(longint p, int sh, bit rnd, int w);
    longint q = p >>> sh;
    if (rnd && sh > 0) q = q + ((p >> (sh - 1)) & 1);
    return wrap(q, w);
  endfunction

  function automatic int stages_of(int n);
    int s = 0;
    while (n > 1) begin n = n / 4; s++; end
    return s;
  endfunction

  function automatic int width_after(int model, int in_w, int tw_w, int s);
    return (model == 0) ? in_w + s * (tw_w + 1) : in_w + 2 * s;
  endfunction

  // Bit-exact model. xr/xi: inputs; yr/yi: outputs in natural order.
  // last_stage: run only the first 'upto' stages (0 = all) and return the
  // intermediate array in position order (used by the stage testbench).
  function automatic void ref_fft(int n, int in_w, int tw_w, int model,
                                  const ref longint xr[], const ref longint xi[],
                                  ref longint yr[], ref longint yi[], input int upto = 0);
    int     ns   = stages_of(n);
    int     outw = $clog2(n) + in_w - 1;
    bit     rnd  = (model == 2);
    longint ar[], ai[];
    int     last;
    ar = new[n]; ai = new[n];
    for (int i = 0; i < n; i++) begin ar[i] = xr[i]; ai[i] = xi[i]; end
    last = (upto == 0) ? ns : upto;
    for (int s = 1; s <= last; s++) begin
      int L = n >> (2 * (s - 1));
      int Q = L / 4;
      bit mul = (s != ns);
      int w   = mul ? width_after(model, in_w, tw_w, s) : outw;
      int sh  = mul ? ((model == 0) ? 0 : tw_w - 1) : ((model == 0) ? (ns - 1) * (tw_w - 1) : 0);
      for (int g = 0; g < n / L; g++) begin
        for (int m = 0; m < Q; m++) begin
          longint vr[4], vi[4], dr[4], di[4];
          for (int q = 0; q < 4; q++) begin
            vr[q] = ar[g * L + m + q * Q];
            vi[q] = ai[g * L + m + q * Q];
          end
          // 4-point DFT by definition: d_k = sum_q v_q * (-j)^(k*q)
          for (int k = 0; k < 4; k++) begin
            dr[k] = 0; di[k] = 0;
            for (int q = 0; q < 4; q++) begin
              case ((k * q) % 4)
                0: begin dr[k] += vr[q]; di[k] += vi[q]; end
                1: begin dr[k] += vi[q]; di[k] -= vr[q]; end   // * -j
                2: begin dr[k] -= vr[q]; di[k] -= vi[q]; end   // * -1
                3: begin dr[k] -= vi[q]; di[k] += vr[q]; end   // * +j
              endcase
            end
          end
          for (int k = 0; k < 4; k++) begin
            longint pr, pi, wr, wi;
            if (mul) begin
              ref_twiddle(n, tw_w, (k * m * (n / L)) % n, wr, wi);
              pr = dr[k] * wr - di[k] * wi;
              pi = dr[k] * wi + di[k] * wr;
            end else begin
              pr = dr[k];
              pi = di[k];
            end
            ar[g * L + m + k * Q] = scale(pr, sh, rnd, w);
            ai[g * L + m + k * Q] = scale(pi, sh, rnd, w);
          end
        end
      end
    end
    yr = new[n]; yi = new[n];
    if (upto != 0) begin
      for (int i = 0; i < n; i++) begin yr[i] = ar[i]; yi[i] = ai[i]; end
      return;
    end
    for (int k = 0; k < n; k++) begin
      int p = 0, kk = k;
      for (int d = 0; d < ns; d++) begin p = p * 4 + kk % 4; kk = kk / 4; end
      yr[k] = ar[p];
      yi[k] = ai[p];
    end
    if (model == 3) begin
      for (int k = 1; k < n / 2; k++) begin
        yr[k] = yr[n - k];
        yi[k] = wrap(-yi[n - k], outw);
      end
    end
  endfunction

  // Double-precision DFT of a complex integer frame.
  function automatic void dft(int n, const ref longint xr[], const ref longint xi[],
                              ref real yr[], ref real yi[]);
    real c[], s[];
    c = new[n]; s = new[n];
    yr = new[n]; yi = new[n];
    for (int m = 0; m < n; m++) begin
      c[m] = $cos(2.0 * PI * m / n);
      s[m] = $sin(2.0 * PI * m / n);
    end
    for (int k = 0; k < n; k++) begin
      real accr = 0.0, acci = 0.0;
      for (int i = 0; i < n; i++) begin
        int m = (k * i) % n;
        // x * (cos - j sin)
        accr += xr[i] * c[m] + xi[i] * s[m];
        acci += xi[i] * c[m] - xr[i] * s[m];
      end
      yr[k] = accr;
      yi[k] = acci;
    end
  endfunction

  // Error energy and reference energy over bins [k0, k1).
  function automatic void err_energy(int k0, int k1, const ref longint gr[], const ref longint gi[],
                                     const ref real rr[], const ref real ri[],
                                     output real e, output real p);
    e = 0.0; p = 0.0;
    for (int k = k0; k < k1; k++) begin
      e += (gr[k] - rr[k]) ** 2 + (gi[k] - ri[k]) ** 2;
      p += rr[k] ** 2 + ri[k] ** 2;
    end
  endfunction

  // Real-valued multicarrier frame: random QPSK on bins 1 .. n/2-1 with
  // Hermitian symmetry, inverse DFT, scaled so that the peak is 'peak'.
  function automatic void make_ofdm(int n, int peak, ref longint xr[], ref longint xi[]);
    real t[], c[], mx;
    t = new[n]; c = new[n];
    for (int m = 0; m < n; m++) c[m] = $cos(2.0 * PI * m / n);
    for (int i = 0; i < n; i++) t[i] = 0.0;
    for (int k = 1; k < n / 2; k++) begin
      real a = ($urandom_range(1) != 0) ? 1.0 : -1.0;
      real b = ($urandom_range(1) != 0) ? 1.0 : -1.0;
      // contribution of bins k and n-k: 2*(a*cos - b*sin)
      for (int i = 0; i < n; i++)
        t[i] += 2.0 * (a * c[(k * i) % n] - b * c[((k * i) + 3 * n / 4) % n]);
    end
    mx = 0.0;
    for (int i = 0; i < n; i++) if (t[i] > mx || -t[i] > mx) mx = (t[i] > 0) ? t[i] : -t[i];
    xr = new[n]; xi = new[n];
    for (int i = 0; i < n; i++) begin
      xr[i] = longint'(t[i] * peak / mx);
      xi[i] = 0;
    end
  endfunction

  // Uniform random frame; complex if cplx is set.
  function automatic void make_random(int n, int amp, bit cplx, ref longint xr[], ref longint xi[]);
    xr = new[n]; xi = new[n];
    for (int i = 0; i < n; i++) begin
      xr[i] = longint'($urandom_range(2 * amp)) - amp;
      xi[i] = cplx ? longint'($urandom_range(2 * amp)) - amp : 0;
    end
  endfunction

endpackage
