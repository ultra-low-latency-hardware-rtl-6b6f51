// tb_test_controller: checks the reset hold time (sub_rst_n low for exactly
// RESET_CYCLES cycles after rst_n rises), that start is a single-cycle pulse
// issued only when arm is high, that running follows, and that dropping arm
// resets the sub-modules again and a new arm gives a new start.
module tb_test_controller;
  localparam int RC = 16;

  logic clk = 1'b0, rst_n = 1'b0, arm = 1'b0;
  always #5 clk = ~clk;

  logic sub_rst_n, start, running;
  int checks = 0, failures = 0;
  int starts = 0;

  test_controller #(.RESET_CYCLES(RC)) dut (
    .clk(clk), .rst_n(rst_n), .arm(arm), .sub_rst_n(sub_rst_n), .start(start), .running(running)
  );

  always @(posedge clk) if (rst_n && start) starts++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic measure_reset(string tag);
    automatic int n = 0;
    while (!sub_rst_n && n < 100) begin
      @(negedge clk);
      n++;
    end
    check(n == RC, $sformatf("%s: sub reset held %0d cycles, expected %0d", tag, n, RC));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(!sub_rst_n && !start && !running, "outputs in reset");
    rst_n = 1'b1;
    measure_reset("power-up");
    // idle without arm: no start
    repeat (10) begin
      check(sub_rst_n && !start && !running, "idle");
      @(negedge clk);
    end
    arm = 1'b1;
    @(negedge clk);
    check(start && !running, "start pulse after arm");
    @(negedge clk);
    check(!start && running, "start is one cycle, then running");
    repeat (20) begin
      @(negedge clk);
      check(!start && running && sub_rst_n, "running");
    end
    arm = 1'b0;
    @(negedge clk);
    check(!sub_rst_n && !running, "disarm resets the sub-modules");
    measure_reset("re-arm");
    arm = 1'b1;
    @(negedge clk);
    check(start, "second start");
    @(negedge clk);
    check(starts == 2, $sformatf("%0d start pulses, expected 2", starts));
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
