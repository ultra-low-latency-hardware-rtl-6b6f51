// output_combiner: captures one FFT output frame and presents it as a single
// real and a single imaginary bus for a logic analyser.
//
// When in_valid is high the N real outputs are concatenated into re_bus and
// the N imaginary outputs into im_bus, sample k occupying bits
// [k*W +: W] (sample 0 in the least significant bits), and the buses are
// registered. They hold their value while in_valid is low, so a probe sampling
// at any time sees one complete frame. out_valid is high for one cycle per new
// frame and frame_count counts captured frames (wrapping). Latency: one cycle.
//
// The concatenation follows the published test set-up; bit order, holding and
// the frame counter are this design's own.
module output_combiner #(
  parameter int unsigned N  = 256,
  parameter int unsigned W  = 17,
  parameter int unsigned CW = 16   // width of the frame counter
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re [N],
  input  logic signed [W-1:0] in_im [N],
  output logic                out_valid,
  output logic [CW-1:0]       frame_count,
  output logic [N*W-1:0]      re_bus,
  output logic [N*W-1:0]      im_bus
);

  logic [N*W-1:0] cat_re, cat_im;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      cat_re[k*W +: W] = in_re[k];
      cat_im[k*W +: W] = in_im[k];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      re_bus <= cat_re;
      im_bus <= cat_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      frame_count <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) frame_count <= frame_count + 1'b1;
    end
  end

endmodule
