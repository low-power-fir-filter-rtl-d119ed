// df_ctrl: sequencer of the direct-form core.
//
// One filter output takes N multiply-accumulate steps, one per clock. The
// controller accepts a sample (x_valid && x_ready), has it written into the
// data ring, then issues N fetch steps (coefficient and sample read into
// h_reg/x_reg) and, one cycle behind each, a MAC step; the first MAC of an
// output starts the accumulator from zero. One cycle after the last MAC the
// rounded accumulator is loaded into the output register and y_valid pulses
// on the following cycle.
//
// The next sample is accepted during the last fetch step, so with x_valid
// held high a sample is taken every N cycles and an output leaves every N
// cycles. Latency from the accepting clock edge to y_valid: N+2 cycles.
// The handshake is this design's choice (the control unit is not specified
// beyond its existence). Synchronous logic, asynchronous active-low reset.
module df_ctrl
  import fir_pkg::*;
#(
  parameter int N = N_TAPS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    x_valid,
  output logic    x_ready,
  output df_ctl_t ctl,
  output logic    y_valid
);

  localparam int AW = $clog2(N);

  logic          busy;
  logic [AW-1:0] k;              // fetch step within the current output
  logic          accept, last_fetch;
  logic          mac_q, first_q, last_q, out_q;

  assign last_fetch = busy && (k == AW'(N - 1));
  assign x_ready    = !busy || last_fetch;
  assign accept     = x_valid && x_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      k       <= '0;
      mac_q   <= 1'b0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
      out_q   <= 1'b0;
      y_valid <= 1'b0;
    end else begin
      if (accept)          busy <= 1'b1;
      else if (last_fetch) busy <= 1'b0;
      if (busy) k <= last_fetch ? '0 : k + 1'b1;
      mac_q   <= busy;
      first_q <= busy && (k == '0);
      last_q  <= last_fetch;
      out_q   <= mac_q && last_q;
      y_valid <= out_q;
    end
  end

  always_comb begin
    ctl.wr    = accept;
    ctl.fetch = busy;
    ctl.mac   = mac_q;
    ctl.first = first_q;
    ctl.out   = out_q;
  end

endmodule
