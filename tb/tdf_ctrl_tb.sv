// tdf_ctrl_tb: drives two transpose-form sequencers (N = 5) with the same
// random x_valid: one reads the output in the last step (K_Y = 4), the other
// in step 1 of the next sample (K_Y = 1, Y_PREV = 1). A sample accepted in
// cycle c must give fetch in c..c+N-1 (load_x only at c), x_ready low in
// c+1..c+N-1, MAC in c+1..c+N, zero_alpha at c+1+K_Y, an o_reg load there
// (except for the first sample when Y_PREV) and y_valid one cycle later.
module tdf_ctrl_tb;
  import fir_pkg::*;
  localparam int N = 5, T = 3000;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic x_ready [2], y_valid [2];
  tdf_ctl_t ctl [2];
  bit busy [T+20], exp_fetch [T+20], exp_mac [T+20];
  bit exp_za [2][T+20], exp_out [2][T+20], exp_yv [2][T+20];
  int checks = 0, failures = 0, cyc = 0, nacc = 0, b2b = 0, last_acc = -100;
  localparam int KY [2] = '{4, 1};
  localparam bit YP [2] = '{1'b0, 1'b1};

  tdf_ctrl #(.N(N), .K_Y(4), .Y_PREV(1'b0)) dut0 (
    .clk, .rst_n, .x_valid, .x_ready(x_ready[0]), .ctl(ctl[0]), .y_valid(y_valid[0]));
  tdf_ctrl #(.N(N), .K_Y(1), .Y_PREV(1'b1)) dut1 (
    .clk, .rst_n, .x_valid, .x_ready(x_ready[1]), .ctl(ctl[1]), .y_valid(y_valid[1]));

  always #5 clk = ~clk;

  task automatic expect_bit(input bit got, input bit e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d %s got %0b", cyc, what, got);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit run, acc;
    run = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < T; cyc++) begin
      @(negedge clk);
      if (($urandom % 16) == 0) run = !run;
      x_valid = run && (($urandom % 8) != 0);
      #1;
      acc = x_valid && !busy[cyc];
      for (int d = 0; d < 2; d++) begin
        expect_bit(x_ready[d], !busy[cyc], "x_ready");
        expect_bit(ctl[d].load_x, acc, "load_x");
        expect_bit(ctl[d].fetch, exp_fetch[cyc] || acc, "fetch");
        expect_bit(ctl[d].mac, exp_mac[cyc], "mac");
        expect_bit(ctl[d].zero_alpha, exp_za[d][cyc], "zero_alpha");
        expect_bit(ctl[d].out, exp_out[d][cyc], "out");
        expect_bit(y_valid[d], exp_yv[d][cyc], "y_valid");
      end
      if (acc) begin
        if (cyc - last_acc == N) b2b++;
        last_acc = cyc;
        for (int i = 1; i < N; i++) begin
          busy[cyc+i] = 1;
          exp_fetch[cyc+i] = 1;
        end
        for (int i = 1; i <= N; i++) exp_mac[cyc+i] = 1;
        for (int d = 0; d < 2; d++) begin
          exp_za[d][cyc+1+KY[d]] = 1;
          if (!YP[d] || nacc > 0) begin
            exp_out[d][cyc+1+KY[d]] = 1;
            exp_yv[d][cyc+2+KY[d]]  = 1;
          end
        end
        nacc++;
      end
    end
    if (b2b == 0) failures++;
    $display("samples %0d, back-to-back %0d", nacc, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
