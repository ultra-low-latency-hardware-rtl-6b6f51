// tb_hermitian_mirror: random 256-bin spectra; the lower half (bins 1..127)
// must equal the conjugate of bins 255..129, and bins 0 and 128..255 must pass
// unchanged.
module tb_hermitian_mirror;
  localparam int N = 256, W = 17;

  logic signed [W-1:0] x_re [N], x_im [N], y_re [N], y_im [N];
  int checks = 0, failures = 0;

  hermitian_mirror #(.N(N), .W(W)) dut (.x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im));

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < N; k++) begin
        x_re[k] = W'($urandom);
        x_im[k] = W'($urandom);
      end
      #1;
      for (int k = 0; k < N; k++) begin
        longint er, ei;
        if (k >= 1 && k < N / 2) begin
          er = x_re[N - k];
          ei = -longint'(x_im[N - k]);
        end else begin
          er = x_re[k];
          ei = x_im[k];
        end
        checks++;
        if (y_re[k] != W'(er) || y_im[k] != W'(ei)) begin
          failures++;
          if (failures < 10) $display("FAIL: bin %0d got (%0d,%0d)", k, y_re[k], y_im[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
