// fft_pkg: types, constants and width rules shared by the parallel radix-4 FFT.
//
// The FFT is built from log4(N) stages of N/4 radix-4 dragonflies. The register
// width after each stage follows two rules:
//   * scale-back models (SB-NC, SB-WC, SB-MNC): every multiplication stage grows
//     the word by 2 bits (input + 1 dragonfly bit + TW_W twiddle bits - (TW_W-1)
//     bits of back scaling), e.g. 10 -> 12 -> 14 -> 16 for N = 256;
//   * full-scale model (FS): every multiplication stage grows by TW_W + 1 bits
//     (10 -> 21 -> 32 -> 43) and the whole back scale is applied after the last,
//     adder-only, stage.
// The output of every model is log2(N) + IN_W - 1 bits wide (17 bits for a
// 256-point, 10-bit FFT), which holds the spectrum of a real-valued input whose
// Hermitian-symmetric peak is half of the complex worst case.
//
// The growth rules and the four models follow the published architecture; the
// enum encoding and the generalisation to any power-of-4 size are this design's own.
package fft_pkg;

  // The four FFT models. SB_MNC is the default model of the design.
  typedef enum logic [1:0] {
    FFT_FS     = 2'd0,  // full scale, back scale after the last stage only
    FFT_SB_NC  = 2'd1,  // scale back every stage, plain truncation
    FFT_SB_WC  = 2'd2,  // scale back every stage, truncation compensation
    FFT_SB_MNC = 2'd3   // SB_NC plus conjugate mirror of the upper half
  } fft_model_e;

  localparam int unsigned DEF_N    = 256;  // FFT size
  localparam int unsigned DEF_IN_W = 10;   // input sample width
  localparam int unsigned DEF_TW_W = 10;   // twiddle factor width

  // Number of radix-4 stages of an N-point FFT (N a power of 4).
  function automatic int unsigned num_stages(int unsigned n);
    int unsigned s = 0;
    while (n > 1) begin
      n = n / 4;
      s++;
    end
    return s;
  endfunction

  // Output word width of an N-point real-valued FFT: log2(N) + in_w - 1.
  function automatic int unsigned out_width(int unsigned n, int unsigned in_w);
    return $clog2(n) + in_w - 1;
  endfunction

  // Register width after stage s (s = 0 is the input, s = 1 .. stages-1 the
  // multiplication stages). The last stage always produces out_width().
  function automatic int unsigned stage_width(fft_model_e model, int unsigned in_w,
                                              int unsigned tw_w, int unsigned s);
    if (model == FFT_FS) return in_w + s * (tw_w + 1);
    return in_w + 2 * s;
  endfunction

  // Right shift applied after a multiplication stage.
  function automatic int unsigned stage_shift(fft_model_e model, int unsigned tw_w);
    return (model == FFT_FS) ? 0 : tw_w - 1;
  endfunction

  // Right shift applied after the last (adder-only) stage.
  function automatic int unsigned last_shift(fft_model_e model, int unsigned tw_w,
                                             int unsigned stages);
    return (model == FFT_FS) ? (stages - 1) * (tw_w - 1) : 0;
  endfunction

  // Base-4 digit reversal of k over the given number of digits.
  function automatic int unsigned digit_rev4(int unsigned k, int unsigned digits);
    int unsigned r = 0;
    for (int unsigned d = 0; d < digits; d++) begin
      r = (r << 2) | (k & 3);
      k = k >> 2;
    end
    return r;
  endfunction

endpackage
