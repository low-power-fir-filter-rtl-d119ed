// fir_activity_tb: the four filter configurations - direct form and
// transpose form, each with the normal and the minimum-Hamming coefficient
// order - run on the same stream of random samples (24-tap 16-bit low-pass,
// default coefficients). All four must produce the same, correct outputs
// (checked against a direct convolution). The testbench also counts bit
// toggles at the two multiplier input registers, h_reg (coefficient) and
// x_reg (data), which is the switching activity the orderings and the
// transpose form are meant to cut, and checks the expected relations:
//   * min order toggles the coefficient input less than normal order,
//     in both forms;
//   * the transpose form toggles the data input far less (x_reg changes once
//     per sample instead of every cycle).
module fir_activity_tb;
  import fir_pkg::*;
  localparam int N = N_TAPS, W = DATA_W, NS = 400;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic signed [W-1:0] x = '0;
  logic x_ready [4], y_valid [4];
  logic signed [W-1:0] y [4];
  logic signed [W-1:0] xs [NS];
  logic [W-1:0] h_prev [4], x_prev [4];
  longint h_tog [4], x_tog [4];
  int nin = 0, nout [4], checks = 0, failures = 0;
  string name [4] = '{"DF/norm", "DF/min", "TDF/norm", "TDF/min"};

  fir_df  #(.ORDER_SEL(ORDER_NORM)) c0 (.clk, .rst_n, .x_valid, .x, .x_ready(x_ready[0]), .y(y[0]), .y_valid(y_valid[0]));
  fir_df  #(.ORDER_SEL(ORDER_MIN))  c1 (.clk, .rst_n, .x_valid, .x, .x_ready(x_ready[1]), .y(y[1]), .y_valid(y_valid[1]));
  fir_tdf #(.ORDER_SEL(ORDER_NORM)) c2 (.clk, .rst_n, .x_valid, .x, .x_ready(x_ready[2]), .y(y[2]), .y_valid(y_valid[2]));
  fir_tdf #(.ORDER_SEL(ORDER_MIN))  c3 (.clk, .rst_n, .x_valid, .x, .x_ready(x_ready[3]), .y(y[3]), .y_valid(y_valid[3]));

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
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    logic [W-1:0] hv [4], xv [4];
    hv = '{c0.h_reg, c1.h_reg, c2.h_reg, c3.h_reg};
    xv = '{c0.x_reg, c1.x_reg, c2.x_reg, c3.x_reg};
    for (int d = 0; d < 4; d++) begin
      h_tog[d] += $countones(hv[d] ^ h_prev[d]);
      x_tog[d] += $countones(xv[d] ^ x_prev[d]);
      h_prev[d] = hv[d];
      x_prev[d] = xv[d];
    end
  end

  initial begin
    for (int d = 0; d < 4; d++) begin
      h_tog[d] = 0; x_tog[d] = 0; h_prev[d] = '0; x_prev[d] = '0; nout[d] = 0;
    end
    for (int i = 0; i < NS; i++) xs[i] = W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    forever begin
      @(negedge clk);
      x_valid = nin < NS;
      x = (nin < NS) ? xs[nin] : '0;
      #1;
      for (int d = 0; d < 4; d++) if (y_valid[d]) begin
        checks++;
        if (y[d] !== ref_y(nout[d])) begin
          failures++;
          if (failures < 10) $display("FAIL %s out %0d", name[d], nout[d]);
        end
        nout[d]++;
      end
      checks++;
      if (!(x_ready[0] == x_ready[1] && x_ready[1] == x_ready[2] && x_ready[2] == x_ready[3])) failures++;
      if (x_valid && x_ready[0]) nin++;
      if (nout[0] == NS && nout[1] == NS && nout[2] == NS && nout[3] == NS) break;
    end
    for (int d = 0; d < 4; d++)
      $display("%-8s coefficient-input toggles %0d, data-input toggles %0d", name[d], h_tog[d], x_tog[d]);
    checks += 3;
    if (!(h_tog[1] < h_tog[0])) failures++;
    if (!(h_tog[3] < h_tog[2])) failures++;
    if (!(x_tog[2] * 4 < x_tog[0] && x_tog[3] * 4 < x_tog[1])) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
