// fft_size_check: testbench helper that runs one fft256_parallel instance of
// a given size, model and pipeline option on NF real-valued frames streamed
// back to back, and counts checks and failures: latency, bit-exact result
// against the integer reference model, NMSE against a double-precision DFT.
// It starts after rst_n rises and raises done when all frames are back.
module fft_size_check
  import fft_pkg::*;
  import fft_ref_pkg::*;
#(
  parameter int unsigned N          = 16,
  parameter int          MODEL      = 2,
  parameter bit          MERGE_LAST = 1'b1,
  parameter int          NF         = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int IN_W  = 10;
  localparam int TW_W  = 10;
  localparam int OUT_W = $clog2(N) + IN_W - 1;
  localparam int LAT   = MERGE_LAST ? stages_of(N) - 1 : stages_of(N);
  localparam real NMSE_LIMIT = 1.0e-4;

  logic                    in_valid, out_valid;
  logic signed [IN_W-1:0]  in_re [N], in_im [N];
  logic signed [OUT_W-1:0] out_re [N], out_im [N];

  fft256_parallel #(.N(N), .MODEL(fft_model_e'(MODEL)), .MERGE_LAST(MERGE_LAST)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_re(out_re), .out_im(out_im)
  );

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  longint fr_re [NF][], fr_im [NF][], ex_re [NF][], ex_im [NF][];
  real    df_re [NF][], df_im [NF][];
  longint sent_at [NF];
  int     q [$];
  int     received = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: N=%0d model %0d merge %0d: %s", N, MODEL, MERGE_LAST, what);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (q.size() == 0) begin
        check(0, "out_valid with nothing in flight");
      end else begin
        automatic int f = q.pop_front();
        automatic int bad = 0;
        automatic longint gr[] = new[N];
        automatic longint gi[] = new[N];
        automatic real e, p;
        received++;
        for (int k = 0; k < N; k++) begin
          gr[k] = out_re[k];
          gi[k] = out_im[k];
          if (gr[k] != ex_re[f][k] || gi[k] != ex_im[f][k]) bad++;
        end
        err_energy(0, N, gr, gi, df_re[f], df_im[f], e, p);
        check(cycle - sent_at[f] == LAT, $sformatf("frame %0d latency %0d, expected %0d", f, cycle - sent_at[f], LAT));
        check(bad == 0, $sformatf("frame %0d: %0d bins differ", f, bad));
        check(e / p < NMSE_LIMIT, $sformatf("frame %0d NMSE %e", f, e / p));
      end
    end
  end

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < N; i++) begin in_re[i] = '0; in_im[i] = '0; end
    for (int f = 0; f < NF; f++) begin
      if (f % 2 == 0) make_ofdm(N, 480, fr_re[f], fr_im[f]);
      else            make_random(N, 250, 1'b0, fr_re[f], fr_im[f]);
      ref_fft(N, IN_W, TW_W, MODEL, fr_re[f], fr_im[f], ex_re[f], ex_im[f]);
      dft(N, fr_re[f], fr_im[f], df_re[f], df_im[f]);
    end
    @(posedge rst_n);
    @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < N; i++) begin
        in_re[i] = IN_W'(fr_re[f][i]);
        in_im[i] = IN_W'(fr_im[f][i]);
      end
      in_valid   = 1'b1;
      sent_at[f] = cycle;
      q.push_back(f);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    check(received == NF, $sformatf("received %0d of %0d frames", received, NF));
    done = 1'b1;
  end
endmodule
