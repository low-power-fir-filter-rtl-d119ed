// tdf_ctrl: sequencer of the transpose-form core.
//
// A sample is accepted in a cycle whose fetch step is step 0: the sample is
// loaded into x_reg at that edge and stays there for the N steps of the
// sample, while the first coefficient is fetched into h_reg. Steps 1..N-1
// follow back to back. Each fetch is followed one cycle later by a MAC step
// that writes alpha + h*x into the partial-sum ring. In step K_Y (the step
// that uses h_(N-1)) the word read from the ring is a finished output: alpha
// is forced to zero and the word is rounded into the output register;
// y_valid follows one cycle later. When Y_PREV is set that word is the output
// of the previous sample, so the very first one after reset (which holds no
// output yet) is not reported.
//
// x_ready is high exactly when the next step is step 0; with x_valid held
// high a sample is accepted every N cycles. Latency from the accepting edge
// to y_valid: K_Y+1 cycles (plus one sample period when Y_PREV). The
// handshake is this design's choice. Asynchronous active-low reset.
module tdf_ctrl
  import fir_pkg::*;
#(
  parameter int N      = N_TAPS,
  parameter int K_Y    = N_TAPS - 1,
  parameter bit Y_PREV = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     x_valid,
  output logic     x_ready,
  output tdf_ctl_t ctl,
  output logic     y_valid
);

  localparam int AW = $clog2(N);

  logic [AW-1:0] k;        // step to be fetched next
  logic [AW-1:0] mac_k;    // step in its MAC cycle
  logic          fetch, mac_q, have_prev, y_slot;

  assign x_ready = (k == '0);
  assign fetch   = x_ready ? x_valid : 1'b1;
  assign y_slot  = mac_q && (mac_k == AW'(K_Y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k         <= '0;
      mac_k     <= '0;
      mac_q     <= 1'b0;
      have_prev <= 1'b0;
      y_valid   <= 1'b0;
    end else begin
      if (fetch) k <= (k == AW'(N - 1)) ? '0 : k + 1'b1;
      mac_q   <= fetch;
      mac_k   <= k;
      if (y_slot) have_prev <= 1'b1;
      y_valid <= ctl.out;
    end
  end

  always_comb begin
    ctl.load_x     = fetch && x_ready;
    ctl.fetch      = fetch;
    ctl.mac        = mac_q;
    ctl.zero_alpha = y_slot;
    ctl.out        = y_slot && (!Y_PREV || have_prev);
  end

endmodule
