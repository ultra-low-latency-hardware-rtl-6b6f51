// test_controller: reset and start sequencing of the FFT test system.
//
// After the system reset (rst_n) is released, the controller keeps the
// sub-module reset (sub_rst_n) asserted for RESET_CYCLES more cycles, then
// waits in IDLE until the run request `arm` is high. It then issues a
// one-cycle `start` pulse to the sample generator and stays in RUN while arm
// stays high. Dropping arm returns to RESET: the sub-modules are reset again
// and a new run can be started from frame 0. `running` is high in RUN. All outputs are registered, so each
// output follows its state on the same clock edge as the state register.
// States: S_RESET -> S_IDLE -> S_START -> S_RUN -> S_RESET.
//
// The published test set-up only says that a controller sends start and reset
// signals; this state machine is this design's own.
module test_controller #(
  parameter int unsigned RESET_CYCLES = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic arm,
  output logic sub_rst_n,
  output logic start,
  output logic running
);

  typedef enum logic [1:0] {S_RESET, S_IDLE, S_START, S_RUN} state_e;

  localparam int unsigned CNT_W = $clog2(RESET_CYCLES + 1);

  state_e           state, state_nx;
  logic [CNT_W-1:0] cnt;

  always_comb begin
    state_nx = state;
    unique case (state)
      S_RESET: if (cnt == CNT_W'(RESET_CYCLES - 1)) state_nx = S_IDLE;
      S_IDLE:  if (arm) state_nx = S_START;
      S_START: state_nx = arm ? S_RUN : S_RESET;
      S_RUN:   if (!arm) state_nx = S_RESET;
      default: state_nx = S_RESET;
    endcase
  end

  // The outputs are registered decodes of the next state, so the sub-module
  // reset is glitch-free.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_RESET;
      cnt       <= '0;
      sub_rst_n <= 1'b0;
      start     <= 1'b0;
      running   <= 1'b0;
    end else begin
      state     <= state_nx;
      cnt       <= (state == S_RESET && state_nx == S_RESET) ? cnt + 1'b1 : '0;
      sub_rst_n <= (state_nx != S_RESET);
      start     <= (state_nx == S_START);
      running   <= (state_nx == S_RUN);
    end
  end

endmodule
