// coeff_memory: supplies the filter coefficients in processing order.
//
// Holds the N coefficients in a ROM (COEFFS), an N:1 multiplexer that selects
// one of them, a look-up table (ORDER) that turns the step number into a
// coefficient index, and the h_addr counter that walks the table. Each
// asserted `step` advances h_addr by one, wrapping after N, so one filter
// output uses every coefficient once in the order the LUT gives. With the
// normal order the LUT is the identity; with a minimum-Hamming-distance order
// successive h words differ in few bits, which lowers switching at the
// multiplier's coefficient input.
//
// Timing: h and h_idx are combinational from h_addr; h_addr changes at the
// clock edge ending a cycle with step = 1. Reset sets h_addr to 0.
module coeff_memory
  import fir_pkg::*;
#(
  parameter int N = N_TAPS,
  parameter int W = DATA_W,
  parameter logic [N-1:0][W-1:0]     COEFFS = LP24,
  parameter logic [N-1:0][IDX_W-1:0] ORDER  = (N*IDX_W)'(norm_order(N))
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    step,
  output logic signed [W-1:0]     h,
  output logic [IDX_W-1:0]        h_idx,
  output logic [$clog2(N)-1:0]    h_addr
);

  localparam int AW = $clog2(N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          h_addr <= '0;
    else if (step) h_addr <= (h_addr == AW'(N - 1)) ? '0 : h_addr + 1'b1;
  end

  assign h_idx = ORDER[h_addr];   // LUT
  assign h     = COEFFS[h_idx];   // ROM + N:1 mux

endmodule
