// fir_df_tb: end-to-end test of the direct-form core at its default size
// (24 taps, 16 bits), in the minimum-Hamming order (default) and, on the same
// input stream, in the normal order. Each output is compared with a direct
// convolution y(n) = sum h_j x(n-j) worked out in the testbench (64-bit, then
// wrapped to 32 bits, rounded at bit 15 and saturated to 16 bits).
// Stimulus: random full-scale samples with random gaps in x_valid, then a
// stretch of continuous input, then a burst matched to the signs of the
// coefficients that drives the output into saturation.
// Also checks: latency (accepting edge to y_valid = N+2 cycles) and that with
// x_valid held high samples are accepted every N cycles.
module fir_df_tb;
  import fir_pkg::*;
  localparam int N = N_TAPS, W = DATA_W, NS = 400;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic signed [W-1:0] x = '0;
  logic x_ready [2], y_valid [2];
  logic signed [W-1:0] y [2];
  logic signed [W-1:0] xs [NS];
  int acc_cyc [NS];
  int nin = 0, nout [2] = '{0, 0}, cyc = 0;
  int checks = 0, failures = 0, b2b = 0, sat = 0;

  fir_df dut_min (.clk, .rst_n, .x_valid, .x, .x_ready(x_ready[0]), .y(y[0]), .y_valid(y_valid[0]));
  fir_df #(.ORDER_SEL(ORDER_NORM)) dut_norm (
    .clk, .rst_n, .x_valid, .x, .x_ready(x_ready[1]), .y(y[1]), .y_valid(y_valid[1]));

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

  // stimulus and scoreboard, evaluated once per cycle after the falling edge
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    forever begin
      @(negedge clk);
      if (nin < 150)      x_valid = ($urandom % 3) != 0;
      else if (nin < NS)  x_valid = 1'b1;
      else                x_valid = 1'b0;
      if (nin < 300)      x = W'($urandom);
      else if (nin < NS)  x = ($signed(lp24_coeff((NS - 1 - nin) % N)) < 0) ? -16'sd32768 : 16'sd32767;
      #1;
      for (int d = 0; d < 2; d++) begin
        if (y_valid[d]) begin
          logic signed [W-1:0] e;
          e = ref_y(nout[d]);
          checks += 2;
          if (y[d] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL dut%0d out %0d got %0d exp %0d", d, nout[d], y[d], e);
          end
          if (cyc - acc_cyc[nout[d]] != N + 3) begin
            failures++;
            $display("FAIL latency %0d", cyc - acc_cyc[nout[d]]);
          end
          if (d == 0 && (e == 32767 || e == -32768)) sat++;
          nout[d]++;
        end
      end
      checks++;
      if (x_ready[0] != x_ready[1]) failures++;
      if (x_valid && x_ready[0] && nin < NS) begin
        if (nin > 0 && nin >= 151 && cyc - acc_cyc[nin-1] != N) failures++;
        if (nin > 0 && cyc - acc_cyc[nin-1] == N) b2b++;
        xs[nin] = x;
        acc_cyc[nin] = cyc;
        nin++;
      end
      if (nin == NS && nout[0] == NS && nout[1] == NS) break;
      cyc++;
    end
    if (sat == 0 || b2b == 0) failures++;
    $display("outputs %0d, back-to-back %0d, saturated %0d", nout[0], b2b, sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
