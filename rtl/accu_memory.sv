// accu_memory: partial-sum store (accu_ring) of the transpose-form core.
//
// In a transpose-form filter each coefficient product is added to a partial
// sum left by the previous sample, P_j(n) = h_j*x(n) + P_(j+1)(n-1), and
// P_0(n) is the output y(n). Here those partial sums live in a ring of M
// words of 2W bits. Every step writes the new partial sum through the 1:M
// demultiplexer at w_addr, which then advances by one (mod M), so writes are
// strictly sequential. The read address is w_addr + LUT[r_addr]: r_addr
// counts the steps of a sample (mod N) and the LUT holds, per step, how far
// back the needed partial sum was written (offset = M - L, see fir_pkg). In
// the step whose coefficient is h_(N-1) the value read is the finished output
// P_0, which the core sends out instead of adding.
//
// The depth M follows from the processing order: the normal order needs N
// words, an out-of-order sequence keeps some partial sums alive longer and
// needs more. M is chosen so that no word is read in the cycle it is
// rewritten. Flip-flop storage, cleared by reset.
//
// Timing: rd_data is combinational from w_addr and r_addr. `step` writes
// wr_data at w_addr and advances both counters at the clock edge.
module accu_memory
  import fir_pkg::*;
#(
  parameter int N = N_TAPS,
  parameter int W = DATA_W,
  parameter logic [N-1:0][IDX_W-1:0] ORDER = (N*IDX_W)'(norm_order(N)),
  localparam int M  = tdf_depth(order_flat_t'(ORDER), N),
  localparam int AW = $clog2(M),
  localparam int RW = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   step,
  input  logic signed [2*W-1:0]  wr_data,
  output logic signed [2*W-1:0]  rd_data,
  output logic [AW-1:0]          w_addr,
  output logic [AW-1:0]          rd_addr
);

  function automatic logic [N-1:0][AW-1:0] calc_offsets();
    logic [N-1:0][AW-1:0] offs;
    for (int k = 0; k < N; k++)
      offs[k] = AW'(M - tdf_lifetime(order_flat_t'(ORDER), N, k));
    return offs;
  endfunction

  localparam logic [N-1:0][AW-1:0] OFFS = calc_offsets();  // read LUT

  logic [2*W-1:0] ring [M];
  logic [RW-1:0]  r_addr;
  logic [AW:0]    sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_addr <= '0;
      r_addr <= '0;
      for (int i = 0; i < M; i++) ring[i] <= '0;
    end else if (step) begin
      ring[w_addr] <= wr_data;
      w_addr <= (w_addr == AW'(M - 1)) ? '0 : w_addr + 1'b1;
      r_addr <= (r_addr == RW'(N - 1)) ? '0 : r_addr + 1'b1;
    end
  end

  assign sum     = (AW+1)'(w_addr) + (AW+1)'(OFFS[r_addr]);
  assign rd_addr = (sum >= (AW+1)'(M)) ? AW'(sum - (AW+1)'(M)) : AW'(sum);
  assign rd_data = ring[rd_addr];

endmodule
