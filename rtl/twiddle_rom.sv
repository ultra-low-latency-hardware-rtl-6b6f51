// twiddle_rom: constant table of the N twiddle factors W_N^e = exp(-j*2*pi*e/N).
//
// Each factor is a signed TW_W-bit fixed-point number scaled by 2^(TW_W-1), so
// that the back-scaling shift of TW_W-1 bits after a multiplication stage
// divides by the largest twiddle magnitude. Values are rounded to nearest; the
// one value that does not fit (+2^(TW_W-1), at cos 0 = 1 and at sin = -1) is
// saturated to 2^(TW_W-1)-1. The dragonfly treats exponent 0 as an exact unit
// factor, so the saturation only matters for W^(3N/4) = +j.
// The table is computed at elaboration time, so in hardware it is a set of
// constants: the fully parallel FFT keeps its twiddles in fabric, not in block
// RAM. Interface: combinational, exponent e in, (re, im) out, no clock.
//
// The 10-bit width and the 2^(TW_W-1) scale follow the published architecture;
// the rounding and saturation rule is this design's own choice.
module twiddle_rom #(
  parameter int unsigned N    = 256,
  parameter int unsigned TW_W = 10
) (
  input  logic [$clog2(N)-1:0]    e,
  output logic signed [TW_W-1:0]  w_re,
  output logic signed [TW_W-1:0]  w_im
);

  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t tw_table_t [N];

  localparam real PI = 3.14159265358979323846;

  // Rounded, saturated fixed-point value of v * 2^(TW_W-1).
  function automatic tw_t to_fixed(real v);
    longint r;
    r = longint'(v * (2.0 ** (TW_W - 1)));
    if (r > (longint'(1) << (TW_W - 1)) - 1) r = (longint'(1) << (TW_W - 1)) - 1;
    if (r < -(longint'(1) << (TW_W - 1)))    r = -(longint'(1) << (TW_W - 1));
    return tw_t'(r);
  endfunction

  function automatic tw_table_t make_re();
    tw_table_t tab;
    for (int k = 0; k < N; k++) tab[k] = to_fixed($cos(2.0 * PI * k / N));
    return tab;
  endfunction

  function automatic tw_table_t make_im();
    tw_table_t tab;
    for (int k = 0; k < N; k++) tab[k] = to_fixed(-$sin(2.0 * PI * k / N));
    return tab;
  endfunction

  localparam tw_table_t TW_RE = make_re();
  localparam tw_table_t TW_IM = make_im();

  assign w_re = TW_RE[e];
  assign w_im = TW_IM[e];

endmodule
