// fft_stage: one stage of the fully parallel radix-4 DIF FFT.
//
// Stage STAGE (1 = first) splits the N samples into 4^(STAGE-1) independent
// sub-transforms of length L = N / 4^(STAGE-1). Dragonfly j (0 .. N/4-1) works
// on group g = j / (L/4) at offset n = j mod (L/4); it reads positions
// g*L + n + m*L/4 (m = 0..3) and writes its output k back to position
// g*L + n + k*L/4 (in-place DIF wiring). The twiddle of output k is
// W_L^(k*n) = W_N^(k*n*N/L). After the last stage, position p holds frequency
// bin digit_rev4(p).
// All N/4 dragonfly units are instantiated side by side, so the whole stage is
// one combinational level; the caller places the pipeline registers.
//
// 64 dragonflies per stage follow the published architecture; the index
// formulas are the standard in-place DIF graph, written out here.
module fft_stage #(
  parameter int unsigned N      = 256,
  parameter int unsigned STAGE  = 1,
  parameter int unsigned IW     = 10,
  parameter int unsigned OW     = 12,
  parameter int unsigned TW_W   = 10,
  parameter bit          HAS_TW = 1'b1,
  parameter int unsigned SHIFT  = 9,
  parameter bit          ROUND  = 1'b0
) (
  input  logic signed [IW-1:0] x_re [N],
  input  logic signed [IW-1:0] x_im [N],
  output logic signed [OW-1:0] y_re [N],
  output logic signed [OW-1:0] y_im [N]
);

  localparam int unsigned L = N >> (2 * (STAGE - 1));  // sub-transform length
  localparam int unsigned Q = L / 4;                   // quarter length
  localparam int unsigned R = N / L;                   // twiddle exponent step

  for (genvar j = 0; j < N / 4; j++) begin : g_df
    localparam int unsigned G    = j / Q;
    localparam int unsigned NOFF = j % Q;
    localparam int unsigned BASE = G * L + NOFF;

    logic signed [IW-1:0] a_re [4];
    logic signed [IW-1:0] a_im [4];
    logic signed [OW-1:0] b_re [4];
    logic signed [OW-1:0] b_im [4];

    for (genvar m = 0; m < 4; m++) begin : g_io
      assign a_re[m]            = x_re[BASE + m * Q];
      assign a_im[m]            = x_im[BASE + m * Q];
      assign y_re[BASE + m * Q] = b_re[m];
      assign y_im[BASE + m * Q] = b_im[m];
    end

    dragonfly_unit #(
      .N(N), .IW(IW), .OW(OW), .TW_W(TW_W), .HAS_TW(HAS_TW),
      .SHIFT(SHIFT), .ROUND(ROUND),
      .E1((1 * NOFF * R) % N), .E2((2 * NOFF * R) % N), .E3((3 * NOFF * R) % N)
    ) u_unit (
      .x_re(a_re), .x_im(a_im), .y_re(b_re), .y_im(b_im)
    );
  end

endmodule
