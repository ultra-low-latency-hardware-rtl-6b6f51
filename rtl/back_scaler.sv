// back_scaler: divide a product by 2^SHIFT and keep OW bits.
//
// After a twiddle multiplication the word has grown by the twiddle width.
// Instead of dividing by the largest twiddle magnitude, the value is shifted
// right arithmetically by SHIFT bits, which divides by 2^SHIFT and floors.
// With ROUND = 1 the most significant discarded bit is added back to the
// shifted value. In two's complement this rounds to nearest, with ties going
// up (so a remainder of exactly -1/2 rounds the wrong way). It costs one adder
// and no clock cycle. The result keeps its low OW bits: the widths of the
// design are chosen so that typical real-valued signals do not reach the
// limit, and a value that does wraps around (there is no saturation).
// Purely combinational.
//
// The shift and the compensation rule follow the published architecture;
// wrap-around on overflow is this design's own choice.
module back_scaler #(
  parameter int unsigned IW    = 32,
  parameter int unsigned OW    = 12,
  parameter int unsigned SHIFT = 9,
  parameter bit          ROUND = 1'b1
) (
  input  logic signed [IW-1:0] d,
  output logic signed [OW-1:0] q
);

  // Wide enough for the shifted value, its rounding carry and a sign extension
  // up to OW bits.
  localparam int unsigned XW = ((IW > OW) ? IW : OW) + 1;

  logic signed [XW-1:0] dx;
  logic signed [XW-1:0] shifted;
  logic                 round_bit;

  always_comb begin
    dx      = XW'(d);
    shifted = dx >>> SHIFT;
    if (ROUND && SHIFT > 0) round_bit = dx[(SHIFT > 0) ? SHIFT - 1 : 0];
    else                    round_bit = 1'b0;
    q = OW'(shifted + XW'({1'b0, round_bit}));
  end

endmodule
