// fir_tdf: transpose-direct-form FIR filter core with coefficient ordering.
//
// Each input sample x(n) is held in x_reg for N cycles and multiplied by every
// coefficient in turn; each product is added to a partial sum kept from the
// previous sample, P_j(n) = h_j*x(n) + P_(j+1)(n-1), and the output is
// y(n) = P_0(n). The multiplier's data input therefore changes only once per
// N cycles. The partial sums (2W bits each) live in accu_ring (accu_memory),
// written sequentially and read at an offset taken from a LUT. Coefficients
// come from the coefficient memory in the order selected by ORDER_SEL: normal
// or minimum-Hamming-distance. An out-of-order sequence keeps some partial
// sums alive longer, so the ring grows beyond N words (computed from the
// order at elaboration). The finished output is read from the ring in the step
// that uses h_(N-1), rounded and registered in o_reg.
//
// Interface: a sample is taken when x_valid && x_ready (one per N cycles at
// most); y/y_valid give one W-bit output per sample. From the clock edge that
// accepts sample n to the edge raising its y_valid: K+1 cycles, K being the
// step that uses h_(N-1). That is N cycles with the normal order and 2 with
// the default coefficients in the minimum-Hamming order. With an
// order that uses h_(N-1) before h_0, the output of sample n is read during
// sample n+1, so the last output needs one more sample to come out.
// The handshake, rounding rule, greedy ordering, ring sizing rule and default
// coefficient values are this design's choices.
module fir_tdf
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
  localparam int K_Y    = tdf_y_slot(order_flat_t'(ORDER), N);
  localparam bit Y_PREV = tdf_y_prev(order_flat_t'(ORDER), N);
  localparam int M      = tdf_depth(order_flat_t'(ORDER), N);

  tdf_ctl_t               ctl;
  logic signed [W-1:0]    h, h_reg, x_reg, y_rnd;
  logic signed [2*W-1:0]  ring_rd, alpha, mac_out;
  logic [IDX_W-1:0]       h_idx;
  logic [$clog2(N)-1:0]   h_addr;
  logic [$clog2(M)-1:0]   w_addr, rd_addr;

  tdf_ctrl #(.N(N), .K_Y(K_Y), .Y_PREV(Y_PREV)) u_ctrl (
    .clk, .rst_n, .x_valid, .x_ready, .ctl, .y_valid
  );

  coeff_memory #(.N(N), .W(W), .COEFFS(COEFFS), .ORDER(ORDER)) u_coeff (
    .clk, .rst_n, .step(ctl.fetch), .h, .h_idx, .h_addr
  );

  accu_memory #(.N(N), .W(W), .ORDER(ORDER)) u_accu (
    .clk, .rst_n, .step(ctl.mac), .wr_data(mac_out), .rd_data(ring_rd),
    .w_addr, .rd_addr
  );

  assign alpha = ctl.zero_alpha ? '0 : ring_rd;

  mul_add #(.W(W)) u_mac (
    .alpha, .beta(h_reg), .gamma(x_reg), .result(mac_out)
  );

  round_sat #(.W(W)) u_round (.din(ring_rd), .dout(y_rnd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_reg <= '0;
      x_reg <= '0;
      y     <= '0;
    end else begin
      if (ctl.fetch)  h_reg <= h;
      if (ctl.load_x) x_reg <= x;
      if (ctl.out)    y     <= y_rnd;   // o_reg
    end
  end

endmodule
