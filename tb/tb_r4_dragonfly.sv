// tb_r4_dragonfly: drives random and extreme complex inputs into the 10-bit
// dragonfly and compares all four outputs with the 4-point DFT
// X_k = sum_q x_q * exp(-j*2*pi*k*q/4) evaluated in double precision.
module tb_r4_dragonfly;
  localparam int IW = 10;
  localparam real PI = 3.14159265358979323846;

  logic signed [IW-1:0] x_re [4], x_im [4];
  logic signed [IW+1:0] y_re [4], y_im [4];
  int checks = 0, failures = 0;

  r4_dragonfly #(.IW(IW)) dut (.x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im));

  task automatic run_one();
    #1;
    for (int k = 0; k < 4; k++) begin
      real ar = 0.0, ai = 0.0;
      for (int q = 0; q < 4; q++) begin
        real c = $cos(2.0 * PI * k * q / 4), s = $sin(2.0 * PI * k * q / 4);
        ar += x_re[q] * c + x_im[q] * s;
        ai += x_im[q] * c - x_re[q] * s;
      end
      checks++;
      if (y_re[k] != longint'(ar) || y_im[k] != longint'(ai)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: k=%0d got (%0d,%0d) expected (%f,%f)", k, y_re[k], y_im[k], ar, ai);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int q = 0; q < 4; q++) begin
        x_re[q] = IW'($urandom);
        x_im[q] = IW'($urandom);
      end
      run_one();
    end
    for (int v = 0; v < 2; v++) begin
      for (int q = 0; q < 4; q++) begin
        x_re[q] = v ? -512 : 511;
        x_im[q] = (q % 2) ? -512 : 511;
      end
      run_one();
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
