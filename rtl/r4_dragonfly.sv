// r4_dragonfly: radix-4 decimation-in-frequency dragonfly (a 4-point DFT).
//
// Inputs x0..x3 are the samples x(n), x(n+N/4), x(n+2N/4), x(n+3N/4) of one
// sub-transform. The outputs are
//   y0 = x0 +   x1 + x2 +   x3
//   y1 = x0 - j*x1 - x2 + j*x3
//   y2 = x0 -   x1 + x2 -   x3
//   y3 = x0 + j*x1 - x2 - j*x3
// Multiplication by +-j is a swap of real and imaginary parts with a sign
// change, so the whole network is adders and subtractors only. The outputs
// are IW+2 bits wide, enough for the exact result of any input; the stage that
// uses the dragonfly decides how many of these bits it keeps.
// Purely combinational.
//
// The dragonfly is the one of the published architecture; computing the exact
// IW+2-bit result is this design's choice.
module r4_dragonfly #(
  parameter int unsigned IW = 10
) (
  input  logic signed [IW-1:0]   x_re [4],
  input  logic signed [IW-1:0]   x_im [4],
  output logic signed [IW+1:0]   y_re [4],
  output logic signed [IW+1:0]   y_im [4]
);

  localparam int unsigned DW = IW + 2;

  logic signed [DW-1:0] a_re, a_im, b_re, b_im, c_re, c_im, d_re, d_im;
  logic signed [DW-1:0] s02_re, s02_im, d02_re, d02_im;  // x0 + x2, x0 - x2
  logic signed [DW-1:0] s13_re, s13_im, d13_re, d13_im;  // x1 + x3, x1 - x3

  always_comb begin
    a_re = DW'(x_re[0]);  a_im = DW'(x_im[0]);
    b_re = DW'(x_re[1]);  b_im = DW'(x_im[1]);
    c_re = DW'(x_re[2]);  c_im = DW'(x_im[2]);
    d_re = DW'(x_re[3]);  d_im = DW'(x_im[3]);

    s02_re = a_re + c_re;  s02_im = a_im + c_im;
    d02_re = a_re - c_re;  d02_im = a_im - c_im;
    s13_re = b_re + d_re;  s13_im = b_im + d_im;
    d13_re = b_re - d_re;  d13_im = b_im - d_im;

    y_re[0] = s02_re + s13_re;  y_im[0] = s02_im + s13_im;
    // -j*(x1 - x3) = (x1 - x3).im - j*(x1 - x3).re
    y_re[1] = d02_re + d13_im;  y_im[1] = d02_im - d13_re;
    y_re[2] = s02_re - s13_re;  y_im[2] = s02_im - s13_im;
    // +j*(x1 - x3) = -(x1 - x3).im + j*(x1 - x3).re
    y_re[3] = d02_re - d13_im;  y_im[3] = d02_im + d13_re;
  end

endmodule
