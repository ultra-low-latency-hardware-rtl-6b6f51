// fft256_parallel: fully parallel, pipelined radix-4 DIF FFT of N = 256 points
// for real-valued optical wireless (IM/DD) signals.
//
// All log4(N) = 4 stages of N/4 = 64 dragonflies are instantiated at once, so
// a whole frame of N complex samples enters on one clock edge and a whole
// spectrum leaves LATENCY = log4(N) - 1 = 3 clock cycles later. A new frame may
// enter on every cycle (one frame per clock, 256 samples x 122.88 MHz =
// 31.5 Gsample/s). Pipeline registers follow stages 1 .. log4(N)-2; the last
// multiplication stage and the adder-only last stage share one cycle and are
// followed by the output register.
//
// MODEL selects one of four fixed-point variants (fft_pkg::fft_model_e):
//   FFT_FS     full word growth (10 -> 21 -> 32 -> 43 bits), back scale by
//              2^(3*(TW_W-1)) after the last stage;
//   FFT_SB_NC  back scale by 2^(TW_W-1) after every multiplication stage
//              (10 -> 12 -> 14 -> 16 bits), plain truncation;
//   FFT_SB_WC  as SB_NC with truncation compensation (add the MSB of the
//              discarded remainder);
//   FFT_SB_MNC as SB_NC, then the lower half of the spectrum is replaced by the
//              conjugate of the more accurate upper half (real inputs only).
// The default is FFT_SB_MNC. Every model produces log2(N)+IN_W-1 = 17-bit
// outputs in natural bin order (the digit-reversed order of the DIF stages is
// undone by wiring). Input samples are signed IN_W-bit two's complement; the
// imaginary input is zero for a real-valued signal. Word widths are those of a
// real-valued input: a complex or full-scale input can wrap.
//
// Interface: in_valid qualifies in_re/in_im; out_valid qualifies out_re/out_im
// LATENCY cycles later. Only the valid pipeline is reset.
//
// MERGE_LAST = 0 gives the last stage a cycle of its own (a register after
// every stage, LATENCY = log4(N) = 4), the one-cycle-per-stage figure of a
// fully parallel radix-4 FFT; this eases timing for larger sizes. The default
// MERGE_LAST = 1 is the 3-cycle design.
//
// Stage structure, word widths, the 3-cycle latency and the four models follow
// the published architecture. Natural output order, signed inputs, wrap-around
// and the reset scheme are this design's own choices.
module fft256_parallel
  import fft_pkg::*;
#(
  parameter int unsigned N     = DEF_N,
  parameter int unsigned IN_W  = DEF_IN_W,
  parameter int unsigned TW_W  = DEF_TW_W,
  parameter fft_model_e  MODEL = FFT_SB_MNC,
  parameter bit          MERGE_LAST = 1'b1,
  localparam int unsigned OUT_W   = out_width(N, IN_W),
  localparam int unsigned STAGES  = num_stages(N),
  localparam int unsigned LATENCY = MERGE_LAST ? STAGES - 1 : STAGES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re  [N],
  input  logic signed [IN_W-1:0]  in_im  [N],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re [N],
  output logic signed [OUT_W-1:0] out_im [N]
);

  localparam bit ROUND = (MODEL == FFT_SB_WC);
  // Widest word between two stages (the input of the last stage) or at the
  // output.
  localparam int unsigned MAXW =
      (stage_width(MODEL, IN_W, TW_W, STAGES - 1) > OUT_W) ?
      stage_width(MODEL, IN_W, TW_W, STAGES - 1) : OUT_W;

  // Output of the last stage in digit-reversed position order.
  logic signed [OUT_W-1:0] last_re [N];
  logic signed [OUT_W-1:0] last_im [N];

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    localparam int unsigned SIW = stage_width(MODEL, IN_W, TW_W, s - 1);
    localparam int unsigned SOW = (s == STAGES) ? OUT_W : stage_width(MODEL, IN_W, TW_W, s);
    localparam bit          MUL = (s != STAGES);
    localparam int unsigned SH  = MUL ? stage_shift(MODEL, TW_W)
                                      : last_shift(MODEL, TW_W, STAGES);

    // q_re/q_im: this stage's result as seen by the next stage, sign-extended
    // to MAXW bits (extension is wiring only).
    logic signed [MAXW-1:0] q_re [N];
    logic signed [MAXW-1:0] q_im [N];
    logic signed [SIW-1:0] x_re [N];
    logic signed [SIW-1:0] x_im [N];
    logic signed [SOW-1:0] y_re [N];
    logic signed [SOW-1:0] y_im [N];

    if (s == 1) begin : g_from_in
      assign x_re = in_re;
      assign x_im = in_im;
    end else begin : g_from_prev
      for (genvar i = 0; i < N; i++) begin : g_slice
        assign x_re[i] = g_stage[s-1].q_re[i][SIW-1:0];
        assign x_im[i] = g_stage[s-1].q_im[i][SIW-1:0];
      end
    end

    fft_stage #(
      .N(N), .STAGE(s), .IW(SIW), .OW(SOW), .TW_W(TW_W),
      .HAS_TW(MUL), .SHIFT(SH), .ROUND(ROUND)
    ) u_stage (
      .x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im)
    );

    if (s == STAGES) begin : g_last
      for (genvar i = 0; i < N; i++) begin : g_ext
        assign q_re[i]    = MAXW'(y_re[i]);
        assign q_im[i]    = MAXW'(y_im[i]);
        assign last_re[i] = q_re[i][OUT_W-1:0];
        assign last_im[i] = q_im[i][OUT_W-1:0];
      end
    end else if (MERGE_LAST && s == STAGES - 1) begin : g_comb
      // shares a clock cycle with the last stage
      for (genvar i = 0; i < N; i++) begin : g_ext
        assign q_re[i] = MAXW'(y_re[i]);
        assign q_im[i] = MAXW'(y_im[i]);
      end
    end else begin : g_reg
      logic signed [SOW-1:0] r_re [N];
      logic signed [SOW-1:0] r_im [N];
      always_ff @(posedge clk) begin
        r_re <= y_re;
        r_im <= y_im;
      end
      for (genvar i = 0; i < N; i++) begin : g_ext
        assign q_re[i] = MAXW'(r_re[i]);
        assign q_im[i] = MAXW'(r_im[i]);
      end
    end
  end

  // Undo the digit-reversed order: bin k sits at position digit_rev4(k).
  logic signed [OUT_W-1:0] nat_re [N];
  logic signed [OUT_W-1:0] nat_im [N];
  logic signed [OUT_W-1:0] fin_re [N];
  logic signed [OUT_W-1:0] fin_im [N];

  for (genvar k = 0; k < N; k++) begin : g_order
    assign nat_re[k] = last_re[digit_rev4(k, STAGES)];
    assign nat_im[k] = last_im[digit_rev4(k, STAGES)];
  end

  if (MODEL == FFT_SB_MNC) begin : g_mirror
    hermitian_mirror #(.N(N), .W(OUT_W)) u_mirror (
      .x_re(nat_re), .x_im(nat_im), .y_re(fin_re), .y_im(fin_im)
    );
  end else begin : g_direct
    assign fin_re = nat_re;
    assign fin_im = nat_im;
  end

  always_ff @(posedge clk) begin
    out_re <= fin_re;
    out_im <= fin_im;
  end

  // Valid pipeline: LATENCY cycles.
  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= LATENCY'({vld, in_valid});
  end
  assign out_valid = vld[LATENCY-1];

  initial begin
    assert (N >= 16 && N == (1 << (2 * STAGES)))
      else $error("fft256_parallel: N must be a power of 4 and at least 16");
  end

endmodule
