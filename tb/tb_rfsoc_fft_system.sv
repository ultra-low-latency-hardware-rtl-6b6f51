// tb_rfsoc_fft_system: end-to-end test of the whole test system at its
// default size (256-point SB-MNC FFT, 20 frames of 10-bit samples).
//
// Sequence: power-up reset; the controller must hold the sub-modules in reset
// for 16 cycles. Twenty real-valued frames (multicarrier and random) are
// loaded, the run is armed and the generator streams frames back to back.
// Every combined output frame is unpacked from the probe buses and compared
// with a bit-exact integer model of the SB-MNC FFT; its NMSE against a
// double-precision DFT and its Hermitian symmetry are checked, and it must
// appear exactly 4 cycles (3 FFT + 1 combiner) after its frame entered the FFT.
// During the second pass one frame is reloaded and the third pass must show
// the new contents. Finally the run is disarmed (sub-module reset, output
// stops) and re-armed (replay restarts at frame 0).
// Mechanisms counted, each must occur: reset hold, start, generator wrap,
// live reload, one-frame-per-clock streaming, disarm, restart.
module tb_rfsoc_fft_system;
  import fft_ref_pkg::*;

  localparam int N = 256, IN_W = 10, TW_W = 10, OUT_W = 17, FRAMES = 20;
  localparam int MODEL = 3;           // SB-MNC, the system default
  localparam int LAT = 4;             // FFT + combiner
  localparam real NMSE_LIMIT = 1.0e-4;

  logic clk = 1'b0, rst_n = 1'b0, arm = 1'b0;
  always #5 clk = ~clk;

  logic                     wr_en;
  logic [4:0]               wr_frame;
  logic signed [IN_W-1:0]   wr_re [N], wr_im [N];
  logic                     running, sub_rst_n;
  logic                     probe_in_valid, probe_in_wrap;
  logic [4:0]               probe_in_frame;
  logic signed [IN_W-1:0]   probe_in_re [N], probe_in_im [N];
  logic                     probe_out_valid;
  logic [15:0]              probe_frame_count;
  logic [N*OUT_W-1:0]       probe_re_bus, probe_im_bus;

  rfsoc_fft_system dut (
    .clk(clk), .rst_n(rst_n), .arm(arm),
    .wr_en(wr_en), .wr_frame(wr_frame), .wr_re(wr_re), .wr_im(wr_im),
    .running(running), .sub_rst_n(sub_rst_n),
    .probe_in_valid(probe_in_valid), .probe_in_frame(probe_in_frame), .probe_in_wrap(probe_in_wrap),
    .probe_in_re(probe_in_re), .probe_in_im(probe_in_im),
    .probe_out_valid(probe_out_valid), .probe_frame_count(probe_frame_count),
    .probe_re_bus(probe_re_bus), .probe_im_bus(probe_im_bus)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // frame contents (slot 20 holds the replacement for the reloaded frame)
  longint fr_re [FRAMES + 1][], fr_im [FRAMES + 1][];
  longint ex_re [FRAMES + 1][], ex_im [FRAMES + 1][];
  real    df_re [FRAMES + 1][], df_im [FRAMES + 1][];
  int     slot_of [FRAMES];     // which contents each generator frame holds

  // in-flight frames: content slot and entry cycle
  int     fl_slot [$];
  longint fl_cycle [$];

  // mechanism counters
  int n_reset_hold = 0, n_start = 0, n_wrap = 0, n_reload = 0, n_disarm = 0, n_restart = 0;
  int n_frames_out = 0, n_since_reset = 0, run_len = 0, max_run = 0;
  real e_sum = 0.0, p_sum = 0.0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && dut.start) n_start++;

  // FFT input side: record each frame entering the FFT and check it is the
  // frame the generator claims.
  always @(negedge clk) begin
    if (sub_rst_n && probe_in_valid) begin
      automatic int s = slot_of[probe_in_frame];
      automatic int bad = 0;
      for (int i = 0; i < N; i++)
        if (probe_in_re[i] != fr_re[s][i] || probe_in_im[i] != fr_im[s][i]) bad++;
      check(bad == 0, $sformatf("generator frame %0d: %0d samples differ", probe_in_frame, bad));
      fl_slot.push_back(s);
      fl_cycle.push_back(cycle);
      if (probe_in_wrap) n_wrap++;
    end
  end

  // Output side: unpack and check the combined buses.
  always @(negedge clk) begin
    if (sub_rst_n && probe_out_valid) begin
      run_len++;
      if (run_len > max_run) max_run = run_len;
      if (fl_slot.size() == 0) begin
        check(0, "output frame with nothing in flight");
      end else begin
        automatic int s = fl_slot.pop_front();
        automatic longint c0 = fl_cycle.pop_front();
        automatic int bad = 0, asym = 0;
        automatic longint gr[] = new[N];
        automatic longint gi[] = new[N];
        automatic real e, p;
        for (int k = 0; k < N; k++) begin
          gr[k] = longint'($signed(probe_re_bus[k * OUT_W +: OUT_W]));
          gi[k] = longint'($signed(probe_im_bus[k * OUT_W +: OUT_W]));
          if (gr[k] != ex_re[s][k] || gi[k] != ex_im[s][k]) bad++;
        end
        for (int k = 1; k < N / 2; k++)
          if (gr[k] != gr[N - k] || gi[k] != -gi[N - k]) asym++;
        err_energy(0, N, gr, gi, df_re[s], df_im[s], e, p);
        e_sum += e; p_sum += p;
        n_frames_out++;
        n_since_reset++;
        check(cycle - c0 == LAT, $sformatf("latency %0d, expected %0d", cycle - c0, LAT));
        check(bad == 0, $sformatf("output frame (contents %0d): %0d bins differ", s, bad));
        check(asym == 0, $sformatf("output frame (contents %0d) not Hermitian", s));
        check(e / p < NMSE_LIMIT, $sformatf("output frame (contents %0d) NMSE %e", s, e / p));
        check(probe_frame_count == 16'(n_since_reset), "frame counter");
      end
    end else begin
      run_len = 0;
    end
  end

  task automatic drive_load(int f, int s);
    for (int i = 0; i < N; i++) begin
      wr_re[i] = IN_W'(fr_re[s][i]);
      wr_im[i] = IN_W'(fr_im[s][i]);
    end
    wr_frame = 5'(f);
    wr_en = 1'b1;
  endtask

  task automatic count_reset_hold(string tag);
    automatic int n = 0;
    while (!sub_rst_n && n < 100) begin @(negedge clk); n++; end
    check(n == 16, $sformatf("%s: sub-module reset held %0d cycles", tag, n));
    if (n == 16) n_reset_hold++;
  endtask

  initial begin
    for (int s = 0; s <= FRAMES; s++) begin
      if (s % 2 == 0) make_ofdm(N, 480, fr_re[s], fr_im[s]);
      else            make_random(N, 350, 1'b0, fr_re[s], fr_im[s]);
      ref_fft(N, IN_W, TW_W, MODEL, fr_re[s], fr_im[s], ex_re[s], ex_im[s]);
      dft(N, fr_re[s], fr_im[s], df_re[s], df_im[s]);
    end
    for (int f = 0; f < FRAMES; f++) slot_of[f] = f;

    wr_en = 1'b0; wr_frame = '0;
    for (int i = 0; i < N; i++) begin wr_re[i] = '0; wr_im[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    count_reset_hold("power-up");

    for (int f = 0; f < FRAMES; f++) begin
      drive_load(f, f);
      @(negedge clk);
    end
    wr_en = 1'b0;
    repeat (3) @(negedge clk);
    check(!probe_in_valid && !probe_out_valid, "no frames before arm");

    arm = 1'b1;
    // stream until the middle of the second pass, then reload frame 3
    while (!(probe_in_valid && probe_in_frame == 5'd10 && n_wrap == 1)) @(negedge clk);
    drive_load(3, FRAMES);
    @(negedge clk);
    wr_en = 1'b0;
    n_reload++;
    // from here on generator frame 3 holds slot FRAMES; its next read is in
    // the third pass, more than ten cycles later
    slot_of[3] = FRAMES;
    while (n_wrap < 3) @(negedge clk);
    repeat (10) @(negedge clk);

    // disarm: sub-modules return to reset, output stops
    arm = 1'b0;
    @(negedge clk);
    check(!sub_rst_n, "disarm asserts the sub-module reset");
    n_disarm++;
    fl_slot.delete();
    fl_cycle.delete();
    n_since_reset = 0;
    count_reset_hold("disarm");
    check(!probe_out_valid && !probe_in_valid, "no frames after disarm");

    // re-arm: replay restarts at frame 0
    arm = 1'b1;
    while (!probe_in_valid) @(negedge clk);
    check(probe_in_frame == 0, $sformatf("restart begins at frame %0d", probe_in_frame));
    if (probe_in_frame == 0) n_restart++;
    repeat (30) @(negedge clk);

    $display("frames out %0d, NMSE %e, longest back-to-back run %0d", n_frames_out,
             e_sum / p_sum, max_run);
    $display("mechanisms: reset_hold=%0d start=%0d wrap=%0d reload=%0d disarm=%0d restart=%0d",
             n_reset_hold, n_start, n_wrap, n_reload, n_disarm, n_restart);
    check(n_reset_hold == 2, "reset hold did not happen twice");
    check(n_start == 2, "start did not happen twice");
    check(n_wrap >= 3, "generator wrap did not happen");
    check(n_reload == 1, "reload did not happen");
    check(n_disarm == 1 && n_restart == 1, "disarm/restart did not happen");
    check(max_run >= 3 * FRAMES, "frames did not stream one per clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
