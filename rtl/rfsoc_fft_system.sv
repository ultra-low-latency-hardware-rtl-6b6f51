// rfsoc_fft_system: hardware test system around the fully parallel FFT.
//
// Four parts run from one clock (122.88 MHz on the target board):
//   test_controller  releases the sub-module reset RESET_CYCLES cycles after
//                    rst_n and pulses start when arm is high;
//   test_sample_gen  holds FRAMES test frames of N samples, loaded through the
//                    load port, and replays one frame per clock after start;
//   fft256_parallel  transforms each frame in LATENCY = 3 cycles, one frame
//                    per clock;
//   output_combiner  concatenates each spectrum into one real and one
//                    imaginary bus and holds it.
// The probe ports are the signals a logic analyser core watches: the input
// frame fed to the FFT and the combined output buses.
// Timing: a frame read by the generator in cycle t is on the FFT inputs in
// cycle t+1, on the FFT outputs in cycle t+4 and on the probe buses in cycle
// t+5. The load port may be used at any time, including while the replay runs.
//
// The four parts follow the published test set-up; the logic analyser core is
// not included and its probes are ports of this module.
module rfsoc_fft_system
  import fft_pkg::*;
#(
  parameter int unsigned N            = DEF_N,
  parameter int unsigned IN_W         = DEF_IN_W,
  parameter int unsigned TW_W         = DEF_TW_W,
  parameter fft_model_e  MODEL        = FFT_SB_MNC,
  parameter bit          MERGE_LAST   = 1'b1,
  parameter int unsigned FRAMES       = 20,
  parameter int unsigned RESET_CYCLES = 16,
  parameter int unsigned CW           = 16,
  localparam int unsigned OUT_W       = out_width(N, IN_W),
  localparam int unsigned FW          = (FRAMES > 1) ? $clog2(FRAMES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    arm,
  // test frame load port
  input  logic                    wr_en,
  input  logic [FW-1:0]           wr_frame,
  input  logic signed [IN_W-1:0]  wr_re [N],
  input  logic signed [IN_W-1:0]  wr_im [N],
  // status
  output logic                    running,
  output logic                    sub_rst_n,
  // probes: FFT input
  output logic                    probe_in_valid,
  output logic [FW-1:0]           probe_in_frame,
  output logic                    probe_in_wrap,
  output logic signed [IN_W-1:0]  probe_in_re [N],
  output logic signed [IN_W-1:0]  probe_in_im [N],
  // probes: combined FFT output
  output logic                    probe_out_valid,
  output logic [CW-1:0]           probe_frame_count,
  output logic [N*OUT_W-1:0]      probe_re_bus,
  output logic [N*OUT_W-1:0]      probe_im_bus
);

  logic                   start;
  logic                   fft_valid;
  logic signed [OUT_W-1:0] fft_re [N];
  logic signed [OUT_W-1:0] fft_im [N];

  test_controller #(.RESET_CYCLES(RESET_CYCLES)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .arm(arm),
    .sub_rst_n(sub_rst_n), .start(start), .running(running)
  );

  test_sample_gen #(.N(N), .W(IN_W), .FRAMES(FRAMES)) u_gen (
    .clk(clk), .rst_n(sub_rst_n),
    .wr_en(wr_en), .wr_frame(wr_frame), .wr_re(wr_re), .wr_im(wr_im),
    .start(start),
    .out_valid(probe_in_valid), .out_frame(probe_in_frame), .wrap(probe_in_wrap),
    .out_re(probe_in_re), .out_im(probe_in_im)
  );

  fft256_parallel #(.N(N), .IN_W(IN_W), .TW_W(TW_W), .MODEL(MODEL), .MERGE_LAST(MERGE_LAST)) u_fft (
    .clk(clk), .rst_n(sub_rst_n),
    .in_valid(probe_in_valid), .in_re(probe_in_re), .in_im(probe_in_im),
    .out_valid(fft_valid), .out_re(fft_re), .out_im(fft_im)
  );

  output_combiner #(.N(N), .W(OUT_W), .CW(CW)) u_comb (
    .clk(clk), .rst_n(sub_rst_n),
    .in_valid(fft_valid), .in_re(fft_re), .in_im(fft_im),
    .out_valid(probe_out_valid), .frame_count(probe_frame_count),
    .re_bus(probe_re_bus), .im_bus(probe_im_bus)
  );

endmodule
