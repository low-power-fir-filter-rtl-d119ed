// fir_top_tb: end-to-end test of the whole design with every parameter at its
// default (24 taps, 16 bits, both cores in the minimum-Hamming order).
//
// The same pre-generated sample sequence is fed to the direct-form and the
// transpose-form core, each through its own handshake with its own random
// x_valid pattern. Every output is compared with a direct convolution
// computed here (64-bit sum, wrapped to 32 bits, rounded at bit 15,
// saturated to 16 bits). The sequence ends with a burst matched to the
// coefficient signs, so the rounding stage saturates.
//
// Each mechanism of the design is counted and must occur at least once:
// samples accepted back to back (one per N cycles) and after a stall, out of
// order coefficient fetches (index not one above the previous), data ring
// wrap-around, partial-sum ring addresses beyond N-1 (the extra depth that
// the reordering needs), outputs read from the ring with alpha forced to 0,
// and saturated outputs.
module fir_top_tb;
  import fir_pkg::*;
  localparam int N = N_TAPS, W = DATA_W, NS = 300;

  logic clk = 0, rst_n = 0;
  logic x_valid [2], x_ready [2], y_valid [2];
  logic signed [W-1:0] x [2], y [2];
  logic signed [W-1:0] xs [NS];
  int nin [2] = '{0, 0}, nout [2] = '{0, 0}, last_acc [2] = '{-100, -100};
  int checks = 0, failures = 0, cyc = 0;
  int b2b [2] = '{0, 0}, stall [2] = '{0, 0}, sat = 0;
  int ooo_df = 0, ooo_tdf = 0, dring_wrap = 0, aring_high = 0, zero_alpha = 0;
  int prev_idx_df = -1, prev_idx_tdf = -1;

  fir_top dut (
    .clk, .rst_n,
    .df_x_valid(x_valid[0]), .df_x(x[0]), .df_x_ready(x_ready[0]),
    .df_y(y[0]), .df_y_valid(y_valid[0]),
    .tdf_x_valid(x_valid[1]), .tdf_x(x[1]), .tdf_x_ready(x_ready[1]),
    .tdf_y(y[1]), .tdf_y_valid(y_valid[1])
  );

  always #5 clk = ~clk;

  function automatic logic signed [W-1:0] ref_y(int n);
    longint s = 0;
    logic signed [31:0] s32;
    longint q;
    for (int j = 0; j < N; j++)
      if (n - j >= 0) s += longint'($signed(lp24_coeff(j))) * longint'(xs[n-j]);
    s32 = s[31:0];
    q = (longint'(s32) + 16384 + (longint'(1) << 40)) / 32768 - (longint'(1) << 25);
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return W'(q);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // internal activity, observed through the hierarchy
  always @(posedge clk) if (rst_n) begin
    if (dut.u_df.ctl.fetch) begin
      if (prev_idx_df >= 0 && int'(dut.u_df.h_idx) != prev_idx_df + 1) ooo_df++;
      prev_idx_df = int'(dut.u_df.h_idx);
    end
    if (dut.u_tdf.ctl.fetch) begin
      if (prev_idx_tdf >= 0 && int'(dut.u_tdf.h_idx) != prev_idx_tdf + 1) ooo_tdf++;
      prev_idx_tdf = int'(dut.u_tdf.h_idx);
    end
    if (dut.u_df.ctl.wr && dut.u_df.u_data.w_addr == '0) dring_wrap++;
    if (dut.u_tdf.ctl.mac && int'(dut.u_tdf.w_addr) >= N) aring_high++;
    if (dut.u_tdf.ctl.zero_alpha) zero_alpha++;
  end

  initial begin
    for (int i = 0; i < NS; i++)
      xs[i] = (i < NS - 2 * N) ? W'($urandom)
            : (($signed(lp24_coeff((NS - 1 - i) % N)) < 0) ? -16'sd32768 : 16'sd32767);
    for (int d = 0; d < 2; d++) begin
      x_valid[d] = 0;
      x[d] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    forever begin
      @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        x_valid[d] = (nin[d] < NS) && ((nin[d] > NS / 2) ? 1'b1 : (($urandom % 3) != 0));
        x[d] = (nin[d] < NS) ? xs[nin[d]] : '0;
      end
      #1;
      for (int d = 0; d < 2; d++) begin
        if (y_valid[d]) begin
          logic signed [W-1:0] e;
          e = ref_y(nout[d]);
          checks++;
          if (y[d] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL core %0d out %0d got %0d exp %0d", d, nout[d], y[d], e);
          end
          if (d == 0 && (e == 32767 || e == -32768)) sat++;
          nout[d]++;
        end
        if (x_ready[d] && !x_valid[d] && nin[d] < NS) stall[d]++;
        if (x_valid[d] && x_ready[d]) begin
          checks++;
          if (cyc - last_acc[d] < N) failures++;
          if (cyc - last_acc[d] == N) b2b[d]++;
          last_acc[d] = cyc;
          nin[d]++;
        end
      end
      cyc++;
      if (nout[0] == NS && nout[1] == NS) break;
    end
    $display("cycles %0d outputs %0d/%0d", cyc, nout[0], nout[1]);
    $display("back-to-back df %0d tdf %0d; stalls df %0d tdf %0d", b2b[0], b2b[1], stall[0], stall[1]);
    $display("out-of-order fetches df %0d tdf %0d; data ring wraps %0d; ring words >= N %0d; y reads %0d; saturated %0d",
             ooo_df, ooo_tdf, dring_wrap, aring_high, zero_alpha, sat);
    foreach (b2b[d]) if (b2b[d] == 0 || stall[d] == 0) failures++;
    if (ooo_df == 0 || ooo_tdf == 0 || dring_wrap == 0 || aring_high == 0 || zero_alpha == 0 || sat == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
