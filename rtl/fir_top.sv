// fir_top: the two low-power FIR filter cores side by side.
//
// fir_df is the direct-form realisation (one multiplier, data ring,
// accumulator); fir_tdf is the transpose-direct-form realisation (data held
// at the multiplier for N cycles, partial sums in a ring). Both process the
// coefficients in a selectable order, by default the minimum-Hamming-distance
// order, and both default to the 24-tap, 16-bit low-pass filter. They are
// independent: each has its own sample handshake and output, so either can be
// used alone or both fed the same stream for comparison.
//
// Ports: df_* and tdf_* carry, per core, x_valid/x/x_ready (sample in) and
// y/y_valid (filtered sample out). See fir_df and fir_tdf for timing.
module fir_top
  import fir_pkg::*;
#(
  parameter int     N         = N_TAPS,
  parameter int     W         = DATA_W,
  parameter logic [N-1:0][W-1:0] COEFFS = LP24,
  parameter order_e DF_ORDER  = ORDER_MIN,
  parameter order_e TDF_ORDER = ORDER_MIN
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                df_x_valid,
  input  logic signed [W-1:0] df_x,
  output logic                df_x_ready,
  output logic signed [W-1:0] df_y,
  output logic                df_y_valid,
  input  logic                tdf_x_valid,
  input  logic signed [W-1:0] tdf_x,
  output logic                tdf_x_ready,
  output logic signed [W-1:0] tdf_y,
  output logic                tdf_y_valid
);

  fir_df #(.N(N), .W(W), .COEFFS(COEFFS), .ORDER_SEL(DF_ORDER)) u_df (
    .clk, .rst_n,
    .x_valid(df_x_valid), .x(df_x), .x_ready(df_x_ready),
    .y(df_y), .y_valid(df_y_valid)
  );

  fir_tdf #(.N(N), .W(W), .COEFFS(COEFFS), .ORDER_SEL(TDF_ORDER)) u_tdf (
    .clk, .rst_n,
    .x_valid(tdf_x_valid), .x(tdf_x), .x_ready(tdf_x_ready),
    .y(tdf_y), .y_valid(tdf_y_valid)
  );

endmodule
