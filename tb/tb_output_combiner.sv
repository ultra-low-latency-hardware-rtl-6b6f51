// tb_output_combiner: feeds random 256 x 17-bit frames with random gaps and
// checks that one cycle after each valid frame the two buses hold exactly
// the concatenation (sample k in bits [k*17 +: 17]), that they hold their value
// while no frame arrives, and that out_valid and the frame counter follow.
module tb_output_combiner;
  localparam int N = 256, W = 17;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid;
  logic signed [W-1:0] in_re [N], in_im [N];
  logic                out_valid;
  logic [15:0]         frame_count;
  logic [N*W-1:0]      re_bus, im_bus;
  logic [N*W-1:0]      exp_re, exp_im;
  int checks = 0, failures = 0;
  int frames = 0;

  output_combiner #(.N(N), .W(W), .CW(16)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .frame_count(frame_count), .re_bus(re_bus), .im_bus(im_bus)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    in_valid = 1'b0;
    for (int k = 0; k < N; k++) begin in_re[k] = '0; in_im[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(frame_count == 0 && !out_valid, "reset state");
    for (int t = 0; t < 60; t++) begin
      automatic bit v = ($urandom_range(2) != 0);
      for (int k = 0; k < N; k++) begin
        in_re[k] = W'($urandom);
        in_im[k] = W'($urandom);
      end
      in_valid = v;
      if (v) begin
        // expected concatenation built bit by bit
        for (int k = 0; k < N; k++)
          for (int b = 0; b < W; b++) begin
            exp_re[k * W + b] = in_re[k][b];
            exp_im[k * W + b] = in_im[k][b];
          end
        frames++;
      end
      @(negedge clk);
      check(out_valid == v, "out_valid");
      check(re_bus == exp_re && im_bus == exp_im, $sformatf("bus contents at step %0d", t));
      check(frame_count == 16'(frames), "frame counter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
