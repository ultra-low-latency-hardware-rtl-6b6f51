// tb_fft256_parallel: end-to-end test of the 256-point parallel FFT in all
// four fixed-point models (FS, SB-NC, SB-WC, SB-MNC), side by side, at the
// default size.
//
// A stream of frames is fed to the four instances: 20 real-valued multicarrier
// (OFDM-like) frames back to back, one per clock, then random real and random
// complex frames with idle cycles in between. For every output frame the
// testbench checks
//   * that it appears exactly 3 cycles after its input (latency) and that
//     out_valid is never high without a frame in flight;
//   * every bin against a bit-exact integer model of the same arithmetic;
//   * for real-valued frames, the normalised mean square error (NMSE) against
//     a double-precision DFT, and for SB-MNC the exact Hermitian symmetry of
//     the output;
//   * that over the set of frames, truncation compensation (SB-WC) and the
//     mirror (SB-MNC) are more accurate than plain truncation (SB-NC).
module tb_fft256_parallel;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int N     = 256;
  localparam int IN_W  = 10;
  localparam int TW_W  = 10;
  localparam int OUT_W = 17;
  localparam int NM    = 4;
  localparam int N_OFDM = 20;
  localparam int N_RR   = 8;    // random real frames
  localparam int N_RC   = 4;    // random complex frames
  localparam int NF     = N_OFDM + N_RR + N_RC;
  localparam int LAT    = 3;
  localparam real NMSE_LIMIT = 1.0e-4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    in_valid;
  logic signed [IN_W-1:0]  in_re [N];
  logic signed [IN_W-1:0]  in_im [N];
  logic                    out_valid [NM];
  logic signed [OUT_W-1:0] out_re [NM][N];
  logic signed [OUT_W-1:0] out_im [NM][N];

  for (genvar m = 0; m < NM; m++) begin : g_dut
    fft256_parallel #(.MODEL(fft_model_e'(m))) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
      .out_valid(out_valid[m]), .out_re(out_re[m]), .out_im(out_im[m])
    );
  end

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  longint fr_re [NF][];
  longint fr_im [NF][];
  longint ex_re [NM][NF][];
  longint ex_im [NM][NF][];
  real    dft_re [NF][];
  real    dft_im [NF][];
  longint sent_at [NF];
  int     q [NM][$];
  int     received [NM];
  real    e_all [NM], p_all [NM], e_lo [NM], e_hi [NM];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Output checker: at each falling edge, look at every model's output.
  always @(negedge clk) begin
    if (rst_n) begin
      for (int m = 0; m < NM; m++) begin
        if (out_valid[m]) begin
          if (q[m].size() == 0) begin
            check(0, $sformatf("model %0d: out_valid with no frame in flight", m));
          end else begin
            automatic int f = q[m].pop_front();
            automatic int bad = 0;
            automatic longint gr[] = new[N];
            automatic longint gi[] = new[N];
            received[m]++;
            check(cycle - sent_at[f] == LAT,
                  $sformatf("model %0d frame %0d latency %0d", m, f, cycle - sent_at[f]));
            for (int k = 0; k < N; k++) begin
              gr[k] = out_re[m][k];
              gi[k] = out_im[m][k];
              if (gr[k] != ex_re[m][f][k] || gi[k] != ex_im[m][f][k]) begin
                bad++;
                if (bad < 3)
                  $display("  model %0d frame %0d bin %0d: got (%0d,%0d) expected (%0d,%0d)", m, f, k,
                           gr[k], gi[k], ex_re[m][f][k], ex_im[m][f][k]);
              end
            end
            check(bad == 0, $sformatf("model %0d frame %0d: %0d bins differ from bit-exact model", m, f, bad));
            if (f < N_OFDM + N_RR) begin
              automatic real e, p, el, eh, pl, ph;
              err_energy(0, N, gr, gi, dft_re[f], dft_im[f], e, p);
              err_energy(1, N / 2, gr, gi, dft_re[f], dft_im[f], el, pl);
              err_energy(N / 2 + 1, N, gr, gi, dft_re[f], dft_im[f], eh, ph);
              e_all[m] += e; p_all[m] += p; e_lo[m] += el / pl; e_hi[m] += eh / ph;
              check(e / p < NMSE_LIMIT, $sformatf("model %0d frame %0d NMSE %e", m, f, e / p));
              if (m == 3) begin
                automatic int asym = 0;
                for (int k = 1; k < N / 2; k++)
                  if (gr[k] != gr[N - k] || gi[k] != -gi[N - k]) asym++;
                check(asym == 0, $sformatf("SB-MNC frame %0d not Hermitian in %0d bins", f, asym));
              end
            end
          end
        end
      end
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      if (f < N_OFDM)             make_ofdm(N, 500, fr_re[f], fr_im[f]);
      else if (f < N_OFDM + N_RR) make_random(N, 360, 1'b0, fr_re[f], fr_im[f]);
      else                        make_random(N, 300, 1'b1, fr_re[f], fr_im[f]);
      dft(N, fr_re[f], fr_im[f], dft_re[f], dft_im[f]);
      for (int m = 0; m < NM; m++)
        ref_fft(N, IN_W, TW_W, m, fr_re[f], fr_im[f], ex_re[m][f], ex_im[m][f]);
    end
    for (int m = 0; m < NM; m++) begin
      e_all[m] = 0.0; p_all[m] = 0.0; e_lo[m] = 0.0; e_hi[m] = 0.0; received[m] = 0;
    end

    in_valid = 1'b0;
    for (int i = 0; i < N; i++) begin in_re[i] = '0; in_im[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < N; i++) begin
        in_re[i] = IN_W'(fr_re[f][i]);
        in_im[i] = IN_W'(fr_im[f][i]);
      end
      in_valid   = 1'b1;
      sent_at[f] = cycle;
      for (int m = 0; m < NM; m++) q[m].push_back(f);
      @(negedge clk);
      if (f >= N_OFDM) begin
        // garbage on the inputs while idle must not produce output
        in_valid = 1'b0;
        for (int i = 0; i < N; i++) in_re[i] = IN_W'($urandom);
        repeat (1 + f % 3) @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);

    for (int m = 0; m < NM; m++)
      check(received[m] == NF, $sformatf("model %0d received %0d of %0d frames", m, received[m], NF));
    for (int m = 0; m < NM; m++)
      $display("model %0d: NMSE %e  (lower half %e, upper half %e, mean per frame)", m,
               e_all[m] / p_all[m], e_lo[m] / (N_OFDM + N_RR), e_hi[m] / (N_OFDM + N_RR));
    check(e_all[2] < e_all[1], "SB-WC not more accurate than SB-NC");
    check(e_all[3] < e_all[1], "SB-MNC not more accurate than SB-NC");
    check(e_hi[1] < e_lo[1], "SB-NC upper half not more accurate than lower half");
    check(e_all[0] < e_all[1], "FS not more accurate than SB-NC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
