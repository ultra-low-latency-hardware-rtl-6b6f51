// tb_fft_stage: stages 1, 2 and 4 of a 256-point SB-WC FFT (widths
// 10 -> 12, 12 -> 14 and 16 -> 17 bits). Each is driven with the
// intermediate array that the integer reference model produces before that
// stage and must reproduce the model's array after it, position by position.
// This checks the stride wiring, the per-dragonfly twiddle exponents and the
// back scaling of a whole stage.
module tb_fft_stage;
  import fft_ref_pkg::*;

  localparam int N = 256;
  localparam int MODEL = 2;  // SB-WC

  logic signed [9:0]  s1_x_re [N], s1_x_im [N];
  logic signed [11:0] s1_y_re [N], s1_y_im [N], s2_x_re [N], s2_x_im [N];
  logic signed [13:0] s2_y_re [N], s2_y_im [N];
  logic signed [15:0] s4_x_re [N], s4_x_im [N];
  logic signed [16:0] s4_y_re [N], s4_y_im [N];
  int checks = 0, failures = 0;

  fft_stage #(.N(N), .STAGE(1), .IW(10), .OW(12), .TW_W(10), .HAS_TW(1'b1), .SHIFT(9), .ROUND(1'b1))
    u_s1 (.x_re(s1_x_re), .x_im(s1_x_im), .y_re(s1_y_re), .y_im(s1_y_im));
  fft_stage #(.N(N), .STAGE(2), .IW(12), .OW(14), .TW_W(10), .HAS_TW(1'b1), .SHIFT(9), .ROUND(1'b1))
    u_s2 (.x_re(s2_x_re), .x_im(s2_x_im), .y_re(s2_y_re), .y_im(s2_y_im));
  fft_stage #(.N(N), .STAGE(4), .IW(16), .OW(17), .TW_W(10), .HAS_TW(1'b0), .SHIFT(0), .ROUND(1'b1))
    u_s4 (.x_re(s4_x_re), .x_im(s4_x_im), .y_re(s4_y_re), .y_im(s4_y_im));

  initial begin
    for (int t = 0; t < 10; t++) begin
      longint xr[], xi[], a1r[], a1i[], a2r[], a2i[], a3r[], a3i[], a4r[], a4i[];
      automatic int bad1 = 0, bad2 = 0, bad4 = 0;
      make_random(N, 400, t % 2, xr, xi);
      ref_fft(N, 10, 10, MODEL, xr, xi, a1r, a1i, 1);
      ref_fft(N, 10, 10, MODEL, xr, xi, a2r, a2i, 2);
      ref_fft(N, 10, 10, MODEL, xr, xi, a3r, a3i, 3);
      ref_fft(N, 10, 10, MODEL, xr, xi, a4r, a4i, 4);
      for (int i = 0; i < N; i++) begin
        s1_x_re[i] = 10'(xr[i]);  s1_x_im[i] = 10'(xi[i]);
        s2_x_re[i] = 12'(a1r[i]); s2_x_im[i] = 12'(a1i[i]);
        s4_x_re[i] = 16'(a3r[i]); s4_x_im[i] = 16'(a3i[i]);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        if (s1_y_re[i] != a1r[i] || s1_y_im[i] != a1i[i]) bad1++;
        if (s2_y_re[i] != a2r[i] || s2_y_im[i] != a2i[i]) bad2++;
        if (s4_y_re[i] != a4r[i] || s4_y_im[i] != a4i[i]) bad4++;
      end
      checks += 3;
      if (bad1 != 0) begin failures++; $display("FAIL: frame %0d stage 1: %0d positions differ", t, bad1); end
      if (bad2 != 0) begin failures++; $display("FAIL: frame %0d stage 2: %0d positions differ", t, bad2); end
      if (bad4 != 0) begin failures++; $display("FAIL: frame %0d stage 4: %0d positions differ", t, bad4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
