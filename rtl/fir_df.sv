// fir_df: direct-form FIR filter core with coefficient ordering.
//
// y(n) = sum_{j=0}^{N-1} h_j * x(n-j) is computed with a single multiplier in
// N clock cycles per output. The coefficient memory (ROM + LUT + h_addr) and
// the data memory (circular data_ring + LUT + address adder) deliver, step by
// step, a coefficient h_j and its matching sample x(n-j) in the order given by
// ORDER_SEL: the normal order j = 0..N-1, or an order in which successive
// coefficients are at minimum Hamming distance (fewer toggles at the
// multiplier's coefficient input). Both LUTs hold the same sequence, so the
// sum is the same for any order. The pair is registered in h_reg/x_reg, the
// multiply-add unit adds the product to the 2W-bit accumulator (accu), and
// after N products the accumulator is rounded to W bits into o_reg.
//
// Interface: a sample is taken when x_valid && x_ready; y/y_valid give one
// W-bit output per sample. Throughput one sample per N cycles; latency N+2
// cycles from the accepting clock edge to y_valid. Data and coefficients are
// signed; coefficients are Q1.15 for W = 16 (rounding at bit W-1).
// The block structure follows the direct-form architecture it implements;
// the handshake, the rounding rule, the greedy ordering and the default
// coefficient values are this design's choices.
module fir_df
  import fir_pkg::*;
#(
  parameter int     N         = N_TAPS,
  parameter int     W         = DATA_W,
  parameter logic [N-1:0][W-1:0] COEFFS = LP24,
  parameter order_e ORDER_SEL = ORDER_MIN
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                x_valid,
  input  logic signed [W-1:0] x,
  output logic                x_ready,
  output logic signed [W-1:0] y,
  output logic                y_valid
);

  localparam logic [N-1:0][IDX_W-1:0] ORDER = (N*IDX_W)'(
      (ORDER_SEL == ORDER_MIN) ? min_hamming_order(coef_flat_t'(COEFFS), N, W)
                               : norm_order(N));

  df_ctl_t                ctl;
  logic signed [W-1:0]    h, xs, h_reg, x_reg, y_rnd;
  logic signed [2*W-1:0]  accu, alpha, mac_out;
  logic [IDX_W-1:0]       h_idx;
  logic [$clog2(N)-1:0]   h_addr;

  df_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .x_valid, .x_ready, .ctl, .y_valid
  );

  coeff_memory #(.N(N), .W(W), .COEFFS(COEFFS), .ORDER(ORDER)) u_coeff (
    .clk, .rst_n, .step(ctl.fetch), .h, .h_idx, .h_addr
  );

  data_memory #(.N(N), .W(W), .ORDER(ORDER)) u_data (
    .clk, .rst_n, .wr(ctl.wr), .x_in(x), .step(ctl.fetch), .x_out(xs)
  );

  assign alpha = ctl.first ? '0 : accu;

  mul_add #(.W(W)) u_mac (
    .alpha, .beta(h_reg), .gamma(x_reg), .result(mac_out)
  );

  round_sat #(.W(W)) u_round (.din(accu), .dout(y_rnd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_reg <= '0;
      x_reg <= '0;
      accu  <= '0;
      y     <= '0;
    end else begin
      if (ctl.fetch) begin
        h_reg <= h;
        x_reg <= xs;
      end
      if (ctl.mac) accu <= mac_out;
      if (ctl.out) y <= y_rnd;      // o_reg
    end
  end

endmodule
