// hermitian_mirror: rebuild the lower half of a real signal's spectrum from
// its upper half.
//
// The spectrum of a real-valued signal is Hermitian: X[k] = conj(X[N-k]). A
// fixed-point DIF FFT that truncates after every stage makes larger errors in
// its lower half (bins 1 .. N/2-1) than in its upper half, so the lower half is
// discarded and replaced by the conjugate of the upper half:
//   Y[k] = conj(X[N-k])  for 1 <= k < N/2
//   Y[k] = X[k]          for k = 0 and N/2 <= k < N.
// Bins 0 and N/2 have no partner and pass unchanged. The negation of the
// imaginary part wraps for the most negative value. Inputs and outputs are in
// natural bin order. Purely combinational: wiring and N/2-1 negations.
//
// The mirror follows the published SB-MNC model; keeping bins 0 and N/2 as
// they are is this design's own choice.
module hermitian_mirror #(
  parameter int unsigned N = 256,
  parameter int unsigned W = 17
) (
  input  logic signed [W-1:0] x_re [N],
  input  logic signed [W-1:0] x_im [N],
  output logic signed [W-1:0] y_re [N],
  output logic signed [W-1:0] y_im [N]
);

  for (genvar k = 0; k < N; k++) begin : g_bin
    if (k >= 1 && k < N / 2) begin : g_mirror
      assign y_re[k] = x_re[N - k];
      assign y_im[k] = -x_im[N - k];
    end else begin : g_keep
      assign y_re[k] = x_re[k];
      assign y_im[k] = x_im[k];
    end
  end

endmodule
