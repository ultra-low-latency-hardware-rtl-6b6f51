// tb_back_scaler: checks the shift-and-round rule on random and boundary
// values for both rounding settings. Reference: floor(d / 2^9) for plain
// truncation; floor(d / 2^9 + 1/2) with compensation (ties round up), both
// wrapped to 12 bits. Also checks that compensation never moves the result by
// more than half an LSB from the exact quotient.
module tb_back_scaler;
  localparam int IW = 21, OW = 12, SH = 9;

  logic signed [IW-1:0] d;
  logic signed [OW-1:0] q_nc, q_wc;
  int checks = 0, failures = 0;

  back_scaler #(.IW(IW), .OW(OW), .SHIFT(SH), .ROUND(1'b0)) u_nc (.d(d), .q(q_nc));
  back_scaler #(.IW(IW), .OW(OW), .SHIFT(SH), .ROUND(1'b1)) u_wc (.d(d), .q(q_wc));

  function automatic longint wrap12(longint v);
    v = v & 12'hfff;
    if (v >= 2048) v -= 4096;
    return v;
  endfunction

  task automatic check_value(longint v);
    real    exact;
    longint fl, rn;
    d = IW'(v);
    #1;
    exact = real'(v) / 512.0;
    fl = longint'($floor(exact));
    rn = longint'($floor(exact + 0.5));
    checks++;
    if (q_nc != wrap12(fl) || q_wc != wrap12(rn)) begin
      failures++;
      if (failures < 10) $display("FAIL: d=%0d nc=%0d (exp %0d) wc=%0d (exp %0d)", v, q_nc, fl, q_wc, rn);
    end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) check_value(longint'($urandom_range(2097151)) - 1048576);
    // boundaries: exact multiples, halves, one below/above
    for (int m = -20; m <= 20; m++) begin
      check_value(m * 512);
      check_value(m * 512 + 256);
      check_value(m * 512 + 255);
      check_value(m * 512 - 1);
    end
    check_value(-1048576);
    check_value(1048575);
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
