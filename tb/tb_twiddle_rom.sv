// tb_twiddle_rom: checks every entry of the default 256-entry, 10-bit twiddle
// table against exp(-j*2*pi*e/256) * 512 computed with $cos/$sin: the value
// must be the rounded product, saturated to 511, and within half an LSB of the
// ideal value (one LSB where saturation applies). Also spot-checks the exact
// quarter-wave points, and that the mean absolute error of the normalised
// table is below 1.4e-3, the figure quoted for the 10-bit twiddles.
module tb_twiddle_rom;
  localparam int N = 256;
  localparam int TW_W = 10;
  localparam real PI = 3.14159265358979323846;

  logic [7:0]             e;
  logic signed [TW_W-1:0] w_re, w_im;
  int checks = 0, failures = 0;

  twiddle_rom #(.N(N), .TW_W(TW_W)) dut (.e(e), .w_re(w_re), .w_im(w_im));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real mae = 0.0;

  initial begin
    for (int k = 0; k < N; k++) begin
      real ir, ii, er, ei;
      e = 8'(k);
      #1;
      ir = 512.0 * $cos(2.0 * PI * k / N);
      ii = -512.0 * $sin(2.0 * PI * k / N);
      er = w_re - ir; ei = w_im - ii;
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      mae += (er + ei) / (2.0 * 512.0 * N);
      check(er <= ((ir > 511.0) ? 1.0 : 0.5) && ei <= ((ii > 511.0) ? 1.0 : 0.5),
            $sformatf("e=%0d got (%0d,%0d) ideal (%f,%f)", k, w_re, w_im, ir, ii));
    end
    // mean absolute error of the normalised table against the exact factors
    $display("twiddle mean absolute error %e", mae);
    check(mae < 1.4e-3, $sformatf("mean absolute error %e not below 1.4e-3", mae));
    e = 8'd0;   #1; check(w_re == 511 && w_im == 0,    "W^0");
    e = 8'd64;  #1; check(w_re == 0 && w_im == -512,   "W^64 = -j");
    e = 8'd128; #1; check(w_re == -512 && w_im == 0,   "W^128 = -1");
    e = 8'd192; #1; check(w_re == 0 && w_im == 511,    "W^192 = +j (saturated)");
    e = 8'd32;  #1; check(w_re == 362 && w_im == -362, "W^32");
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
