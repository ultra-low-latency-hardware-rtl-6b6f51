// tb_fft_sizes: the parallel FFT at the other power-of-4 sizes and with the
// last stage given its own cycle. Instances:
//   16 points, SB-WC            latency 1
//   64 points, SB-MNC           latency 2
//   1024 points, SB-NC          latency 4
//   256 points, SB-WC, MERGE_LAST = 0: one register per stage, latency 4
// Each streams 8 real-valued frames back to back and is checked for latency,
// bit-exact output and NMSE (see fft_size_check).
module tb_fft_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NI = 4;
  logic done [NI];
  int   c [NI], f [NI];

  fft_size_check #(.N(16),   .MODEL(2), .MERGE_LAST(1'b1)) u_16   (.clk(clk), .rst_n(rst_n), .done(done[0]), .checks(c[0]), .failures(f[0]));
  fft_size_check #(.N(64),   .MODEL(3), .MERGE_LAST(1'b1)) u_64   (.clk(clk), .rst_n(rst_n), .done(done[1]), .checks(c[1]), .failures(f[1]));
  fft_size_check #(.N(1024), .MODEL(1), .MERGE_LAST(1'b1)) u_1024 (.clk(clk), .rst_n(rst_n), .done(done[2]), .checks(c[2]), .failures(f[2]));
  fft_size_check #(.N(256),  .MODEL(2), .MERGE_LAST(1'b0)) u_256s (.clk(clk), .rst_n(rst_n), .done(done[3]), .checks(c[3]), .failures(f[3]));

  int checks, failures;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NI; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    checks = 0;
    failures = 1;
    for (int i = 0; i < NI; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
