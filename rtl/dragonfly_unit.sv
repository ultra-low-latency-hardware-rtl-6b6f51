// dragonfly_unit: one radix-4 dragonfly of a stage with its twiddle
// multipliers and back scalers.
//
// The four inputs go through the r4_dragonfly adder network (IW+2 bits, exact).
// In a multiplication stage (HAS_TW = 1) output k is then multiplied by the
// constant twiddle W_N^E_k (E_0 = 0), giving a word scaled by 2^(TW_W-1). A
// zero exponent is an exact unit factor and is a plain left shift, so that all
// four outputs carry the same scale. In the last stage (HAS_TW = 0) the
// dragonfly outputs are used as they are. Every output then passes a
// back_scaler: shift right by SHIFT, optional truncation compensation (ROUND),
// keep OW bits.
// Scale-back models use SHIFT = TW_W-1 in each multiplication stage, so the
// stage grows the word by 2 bits; the full-scale model uses SHIFT = 0 there and
// a single large shift after the last stage.
// Purely combinational; twiddles are elaboration-time constants.
//
// The structure follows the published architecture; the exact unit factor for
// exponent 0 and full-precision products before the shift are own choices.
module dragonfly_unit #(
  parameter int unsigned N      = 256,  // FFT size (selects the twiddle table)
  parameter int unsigned IW     = 10,   // input width
  parameter int unsigned OW     = 12,   // output width
  parameter int unsigned TW_W   = 10,   // twiddle width
  parameter bit          HAS_TW = 1'b1, // multiplication stage
  parameter int unsigned SHIFT  = 9,    // back-scaling shift
  parameter bit          ROUND  = 1'b0, // truncation compensation
  parameter int unsigned E1     = 1,    // twiddle exponent of output 1
  parameter int unsigned E2     = 2,    // twiddle exponent of output 2
  parameter int unsigned E3     = 3     // twiddle exponent of output 3
) (
  input  logic signed [IW-1:0] x_re [4],
  input  logic signed [IW-1:0] x_im [4],
  output logic signed [OW-1:0] y_re [4],
  output logic signed [OW-1:0] y_im [4]
);

  localparam int unsigned DW = IW + 2;                       // dragonfly output
  localparam int unsigned PW = HAS_TW ? DW + TW_W + 1 : DW;  // product width
  localparam int unsigned LN = $clog2(N);

  typedef logic [LN-1:0] exp_t;
  localparam exp_t EXPS [4] = '{exp_t'(0), exp_t'(E1), exp_t'(E2), exp_t'(E3)};

  logic signed [DW-1:0] d_re [4];
  logic signed [DW-1:0] d_im [4];
  logic signed [PW-1:0] p_re [4];
  logic signed [PW-1:0] p_im [4];

  r4_dragonfly #(.IW(IW)) u_df (
    .x_re(x_re), .x_im(x_im), .y_re(d_re), .y_im(d_im)
  );

  for (genvar k = 0; k < 4; k++) begin : g_out
    if (HAS_TW) begin : g_mul
      if (EXPS[k] == 0) begin : g_unit
        // W^0 = 1, exactly 2^(TW_W-1) in twiddle units
        always_comb begin
          p_re[k] = PW'(d_re[k]) <<< (TW_W - 1);
          p_im[k] = PW'(d_im[k]) <<< (TW_W - 1);
        end
      end else begin : g_cmul
        logic signed [TW_W-1:0] w_re, w_im;
        logic signed [PW-1:0]   ar, ai, br, bi;

        twiddle_rom #(.N(N), .TW_W(TW_W)) u_tw (
          .e(EXPS[k]), .w_re(w_re), .w_im(w_im)
        );

        always_comb begin
          ar = PW'(d_re[k]);
          ai = PW'(d_im[k]);
          br = PW'(w_re);
          bi = PW'(w_im);
          p_re[k] = ar * br - ai * bi;
          p_im[k] = ar * bi + ai * br;
        end
      end
    end else begin : g_nomul
      always_comb begin
        p_re[k] = d_re[k];
        p_im[k] = d_im[k];
      end
    end

    back_scaler #(.IW(PW), .OW(OW), .SHIFT(SHIFT), .ROUND(ROUND)) u_bs_re (
      .d(p_re[k]), .q(y_re[k])
    );
    back_scaler #(.IW(PW), .OW(OW), .SHIFT(SHIFT), .ROUND(ROUND)) u_bs_im (
      .d(p_im[k]), .q(y_im[k])
    );
  end

endmodule
