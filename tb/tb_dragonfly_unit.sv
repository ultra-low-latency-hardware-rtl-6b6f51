// tb_dragonfly_unit: three dragonfly units as they appear in a 256-point FFT:
//   u_nc : stage-1 unit, twiddles W^5, W^10, W^15, back scale without rounding
//   u_wc : the same with truncation compensation
//   u_tr : stage-1 unit of offset 0 with trivial twiddles (W^0), rounding on
//   u_ls : last-stage unit, no twiddles, 16 -> 17 bits
// Outputs are compared with a model built from the 4-point DFT definition, the
// twiddle rule recomputed with $cos/$sin, and floor / round-half-up division.
module tb_dragonfly_unit;
  import fft_ref_pkg::*;

  localparam int N = 256;

  logic signed [9:0]  x_re [4], x_im [4];
  logic signed [15:0] z_re [4], z_im [4];
  logic signed [11:0] nc_re [4], nc_im [4], wc_re [4], wc_im [4], tr_re [4], tr_im [4];
  logic signed [16:0] ls_re [4], ls_im [4];
  int checks = 0, failures = 0;

  dragonfly_unit #(.N(N), .IW(10), .OW(12), .TW_W(10), .HAS_TW(1'b1), .SHIFT(9), .ROUND(1'b0),
                   .E1(5), .E2(10), .E3(15))
    u_nc (.x_re(x_re), .x_im(x_im), .y_re(nc_re), .y_im(nc_im));
  dragonfly_unit #(.N(N), .IW(10), .OW(12), .TW_W(10), .HAS_TW(1'b1), .SHIFT(9), .ROUND(1'b1),
                   .E1(5), .E2(10), .E3(15))
    u_wc (.x_re(x_re), .x_im(x_im), .y_re(wc_re), .y_im(wc_im));
  dragonfly_unit #(.N(N), .IW(10), .OW(12), .TW_W(10), .HAS_TW(1'b1), .SHIFT(9), .ROUND(1'b1),
                   .E1(0), .E2(0), .E3(0))
    u_tr (.x_re(x_re), .x_im(x_im), .y_re(tr_re), .y_im(tr_im));
  dragonfly_unit #(.N(N), .IW(16), .OW(17), .TW_W(10), .HAS_TW(1'b0), .SHIFT(0), .ROUND(1'b0),
                   .E1(0), .E2(0), .E3(0))
    u_ls (.x_re(z_re), .x_im(z_im), .y_re(ls_re), .y_im(ls_im));

  // 4-point DFT of v by its definition.
  function automatic void dft4(const ref longint vr[4], const ref longint vi[4],
                               ref longint dr[4], ref longint di[4]);
    for (int k = 0; k < 4; k++) begin
      real ar = 0.0, ai = 0.0;
      for (int q = 0; q < 4; q++) begin
        ar += vr[q] * $cos(2.0 * PI * k * q / 4) + vi[q] * $sin(2.0 * PI * k * q / 4);
        ai += vi[q] * $cos(2.0 * PI * k * q / 4) - vr[q] * $sin(2.0 * PI * k * q / 4);
      end
      dr[k] = longint'(ar);
      di[k] = longint'(ai);
    end
  endfunction

  function automatic longint div_floor(longint p, bit rnd);
    real v = real'(p) / 512.0;
    return longint'($floor(rnd ? v + 0.5 : v));
  endfunction

  task automatic cmp(string tag, int k, longint gr, longint gi, longint er, longint ei);
    checks++;
    if (gr != er || gi != ei) begin
      failures++;
      if (failures < 10) $display("FAIL: %s out %0d got (%0d,%0d) expected (%0d,%0d)", tag, k, gr, gi, er, ei);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint vr[4], vi[4], dr[4], di[4], ur[4], ui[4], lr[4], li[4];
      int exps[4] = '{0, 5, 10, 15};
      for (int q = 0; q < 4; q++) begin
        x_re[q] = 10'($urandom);
        x_im[q] = (t % 2) ? 10'($urandom) : 10'(0);
        z_re[q] = 16'($urandom_range(32767)) - 16'(16384);
        z_im[q] = 16'($urandom_range(32767)) - 16'(16384);
        vr[q] = x_re[q]; vi[q] = x_im[q];
        ur[q] = z_re[q]; ui[q] = z_im[q];
      end
      #1;
      dft4(vr, vi, dr, di);
      dft4(ur, ui, lr, li);
      for (int k = 0; k < 4; k++) begin
        longint wr, wi, pr, pi;
        ref_twiddle(N, 10, exps[k], wr, wi);
        pr = dr[k] * wr - di[k] * wi;
        pi = dr[k] * wi + di[k] * wr;
        cmp("nc", k, nc_re[k], nc_im[k], wrap(div_floor(pr, 0), 12), wrap(div_floor(pi, 0), 12));
        cmp("wc", k, wc_re[k], wc_im[k], wrap(div_floor(pr, 1), 12), wrap(div_floor(pi, 1), 12));
        cmp("tr", k, tr_re[k], tr_im[k], wrap(dr[k], 12), wrap(di[k], 12));
        cmp("ls", k, ls_re[k], ls_im[k], wrap(lr[k], 17), wrap(li[k], 17));
      end
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
