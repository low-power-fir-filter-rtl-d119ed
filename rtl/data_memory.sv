// data_memory: sample store of the direct-form core.
//
// A circular buffer (data_ring) of N words holds the current sample and the
// N-1 before it. A new sample is written once per output (write rate f/N)
// through the 1:N demultiplexer at w_addr-1, after which w_addr points at it;
// w_addr therefore moves backwards, so x(n-j) sits at (w_addr + j) mod N and
// no sample is ever moved. The read side has its own r_addr counter, a LUT
// (ORDER) giving the tap index j for each step, and an adder forming the read
// address w_addr + LUT[r_addr] for the N:1 multiplexer. The read LUT holds the
// same tap sequence as the coefficient LUT, so the sample read always matches
// the coefficient fetched in the same step.
//
// The ring is a latch array, as the low-power design calls for: one W-bit
// latch per word instead of a flip-flop, and only the addressed word is
// opened. A write is staged at the rising edge (w_addr moves, the sample goes
// into the write register wd_q) and the addressed latch is transparent while
// clk is low in the following cycle. The latch enables are decoded only from
// registered signals, so they are stable during the low phase. Reset clears
// the latches so that the first outputs see zero history. The latches are
// intended: synthesis reports them as latch bits.
//
// Timing, as seen at rising edges: x_out is combinational from w_addr, r_addr
// and the ring. `wr` takes x_in at the edge; the new sample is in the ring
// (at the new w_addr) by the next rising edge, so a fetch in the following
// cycle reads it. A read in the cycle of `wr` itself still sees the old w_addr
// and old contents. `step` advances r_addr (mod N).
module data_memory
  import fir_pkg::*;
#(
  parameter int N = N_TAPS,
  parameter int W = DATA_W,
  parameter logic [N-1:0][IDX_W-1:0] ORDER = (N*IDX_W)'(norm_order(N))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr,
  input  logic signed [W-1:0]  x_in,
  input  logic                 step,
  output logic signed [W-1:0]  x_out
);

  localparam int AW = $clog2(N);

  logic [W-1:0]  ring [N];
  logic [AW-1:0] w_addr, r_addr, w_prev, rd_addr;
  logic [AW:0]   sum;

  assign w_prev = (w_addr == '0) ? AW'(N - 1) : w_addr - 1'b1;

  logic          wr_q;   // a staged write is pending for this low phase
  logic [W-1:0]  wd_q;   // staged write data

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_addr <= '0;
      wr_q   <= 1'b0;
      wd_q   <= '0;
    end else begin
      wr_q <= wr;
      if (wr) begin
        w_addr <= w_prev;
        wd_q   <= x_in;
      end
    end
  end

  // data_ring: word i is transparent while clk is low and a staged write
  // addresses it
  always_latch begin
    for (int i = 0; i < N; i++) begin
      if (!rst_n)                                    ring[i] = '0;
      else if (!clk && wr_q && (w_addr == AW'(i)))   ring[i] = wd_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    r_addr <= '0;
    else if (step) r_addr <= (r_addr == AW'(N - 1)) ? '0 : r_addr + 1'b1;
  end

  // read address = w_addr + LUT[r_addr]  (mod N)
  assign sum     = (AW+1)'(w_addr) + (AW+1)'(ORDER[r_addr]);
  assign rd_addr = (sum >= (AW+1)'(N)) ? AW'(sum - (AW+1)'(N)) : AW'(sum);
  assign x_out   = ring[rd_addr];

endmodule
