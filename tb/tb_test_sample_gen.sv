// tb_test_sample_gen: loads 20 frames of 256 random complex samples, starts
// the replay and checks, cycle by cycle, that frames 0..19 come out in order,
// one per cycle, with out_frame and the wrap flag right, for three passes.
// Then overwrites one frame during the replay and checks the next pass shows
// the new contents, and that a second start restarts at frame 0.
module tb_test_sample_gen;
  localparam int N = 256, W = 10, FRAMES = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                wr_en, start;
  logic [4:0]          wr_frame;
  logic signed [W-1:0] wr_re [N], wr_im [N];
  logic                out_valid, wrap;
  logic [4:0]          out_frame;
  logic signed [W-1:0] out_re [N], out_im [N];
  int checks = 0, failures = 0;
  int wraps = 0;

  logic signed [W-1:0] model_re [FRAMES][N];
  logic signed [W-1:0] model_im [FRAMES][N];

  test_sample_gen #(.N(N), .W(W), .FRAMES(FRAMES)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_frame(wr_frame), .wr_re(wr_re), .wr_im(wr_im),
    .start(start), .out_valid(out_valid), .out_frame(out_frame), .wrap(wrap),
    .out_re(out_re), .out_im(out_im)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic check_frame(int f);
    automatic int bad = 0;
    check(out_valid, $sformatf("out_valid low, expected frame %0d", f));
    check(out_frame == 5'(f), $sformatf("out_frame %0d expected %0d", out_frame, f));
    check(wrap == (f == FRAMES - 1), $sformatf("wrap flag at frame %0d", f));
    for (int i = 0; i < N; i++)
      if (out_re[i] != model_re[f][i] || out_im[i] != model_im[f][i]) bad++;
    check(bad == 0, $sformatf("frame %0d: %0d samples differ", f, bad));
    if (wrap) wraps++;
  endtask

  task automatic load(int f);
    for (int i = 0; i < N; i++) begin
      model_re[f][i] = W'($urandom);
      model_im[f][i] = W'($urandom);
      wr_re[i] = model_re[f][i];
      wr_im[i] = model_im[f][i];
    end
    wr_frame = 5'(f);
    wr_en = 1'b1;
  endtask

  initial begin
    wr_en = 1'b0; start = 1'b0; wr_frame = '0;
    for (int i = 0; i < N; i++) begin wr_re[i] = '0; wr_im[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      load(f);
      @(negedge clk);
      check(!out_valid, "out_valid before start");
    end
    wr_en = 1'b0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int p = 0; p < 3; p++) begin
      for (int f = 0; f < FRAMES; f++) begin
        check_frame(f);
        if (p == 1 && f == 5) load(12);  // rewrite frame 12 in the second pass
        @(negedge clk);
        wr_en = 1'b0;
      end
    end
    // restart at frame 0 in the middle of a pass
    for (int f = 0; f < 7; f++) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int f = 0; f < 4; f++) begin
      check_frame(f);
      @(negedge clk);
    end
    check(wraps == 3, $sformatf("wraps seen %0d, expected 3", wraps));
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
