// test_sample_gen: frame store that replays FRAMES test frames of N complex
// samples to the parallel FFT, one whole frame per clock cycle.
//
// The frames are held in a register array (FRAMES x N x 2 words of W bits).
// They are written one whole frame per cycle through the load port (wr_en,
// wr_frame, wr_re, wr_im), so any set of reference frames can be used. A
// one-cycle start pulse begins the replay at frame 0; from then on frame
// 0, 1, .., FRAMES-1, 0, 1, .. appears on out_re/out_im, one per cycle, with
// out_valid high and out_frame giving its number. wrap pulses with the last
// frame of each pass. Outputs are registered: the frame read in cycle t is on
// the outputs in cycle t+1. A write and a read of the same frame in the same
// cycle read the old contents. Reset clears the run state, not the store.
//
// The cyclic replay of 20 frames follows the published test set-up; the load
// port and the timing are this design's own.
module test_sample_gen #(
  parameter int unsigned N      = 256,
  parameter int unsigned W      = 10,
  parameter int unsigned FRAMES = 20,
  localparam int unsigned FW    = (FRAMES > 1) ? $clog2(FRAMES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // load port
  input  logic                wr_en,
  input  logic [FW-1:0]       wr_frame,
  input  logic signed [W-1:0] wr_re [N],
  input  logic signed [W-1:0] wr_im [N],
  // replay control
  input  logic                start,
  // frame output
  output logic                out_valid,
  output logic [FW-1:0]       out_frame,
  output logic                wrap,
  output logic signed [W-1:0] out_re [N],
  output logic signed [W-1:0] out_im [N]
);

  logic signed [W-1:0] mem_re [FRAMES][N];
  logic signed [W-1:0] mem_im [FRAMES][N];

  logic          running;
  logic [FW-1:0] rd_frame;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem_re[wr_frame] <= wr_re;
      mem_im[wr_frame] <= wr_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      rd_frame  <= '0;
      out_valid <= 1'b0;
      out_frame <= '0;
      wrap      <= 1'b0;
    end else begin
      if (start) begin
        running  <= 1'b1;
        rd_frame <= FW'(1 % FRAMES);
      end else if (running) begin
        rd_frame <= (rd_frame == FW'(FRAMES - 1)) ? '0 : rd_frame + 1'b1;
      end
      out_valid <= start || running;
      out_frame <= start ? '0 : rd_frame;
      wrap      <= (start || running) && ((start ? '0 : rd_frame) == FW'(FRAMES - 1));
    end
  end

  always_ff @(posedge clk) begin
    out_re <= mem_re[start ? '0 : rd_frame];
    out_im <= mem_im[start ? '0 : rd_frame];
  end

endmodule
