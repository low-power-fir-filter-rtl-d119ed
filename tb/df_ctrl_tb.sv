// df_ctrl_tb: drives the direct-form sequencer (N = 5) with random x_valid
// (long runs of 1 and of 0) and checks every cycle against a schedule built
// from the accepted samples: a sample accepted in cycle c gives fetch in
// c+1..c+N, MAC in c+2..c+N+1 with `first` at c+2, o_reg load at c+N+2 and
// y_valid at c+N+3; x_ready is low in c+1..c+N-1 only. Also checks that
// back-to-back samples are accepted exactly N cycles apart.
module df_ctrl_tb;
  import fir_pkg::*;
  localparam int N = 5, T = 3000;

  logic clk = 0, rst_n = 0, x_valid = 0, x_ready, y_valid;
  df_ctl_t ctl;
  bit exp_fetch [T+20], exp_mac [T+20], exp_first [T+20], exp_out [T+20], exp_yv [T+20], busy [T+20];
  int checks = 0, failures = 0, cyc = 0, last_acc = -100, b2b = 0;

  df_ctrl #(.N(N)) dut (.*);

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
    bit run;
    run = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < T; cyc++) begin
      @(negedge clk);
      if (($urandom % 16) == 0) run = !run;
      x_valid = run && (($urandom % 8) != 0);
      #1;
      expect_bit(x_ready, !busy[cyc], "x_ready");
      expect_bit(ctl.wr, x_valid && !busy[cyc], "wr");
      expect_bit(ctl.fetch, exp_fetch[cyc], "fetch");
      expect_bit(ctl.mac, exp_mac[cyc], "mac");
      expect_bit(ctl.first, exp_first[cyc], "first");
      expect_bit(ctl.out, exp_out[cyc], "out");
      expect_bit(y_valid, exp_yv[cyc], "y_valid");
      if (x_valid && x_ready) begin
        if (cyc - last_acc == N) b2b++;
        if (cyc - last_acc < N) failures++;
        last_acc = cyc;
        for (int i = 1; i <= N; i++) exp_fetch[cyc+i] = 1;
        for (int i = 1; i < N; i++) busy[cyc+i] = 1;
        for (int i = 2; i <= N + 1; i++) exp_mac[cyc+i] = 1;
        exp_first[cyc+2]  = 1;
        exp_out[cyc+N+2]  = 1;
        exp_yv[cyc+N+3]   = 1;
      end
    end
    if (b2b == 0) failures++;
    $display("back-to-back accepts: %0d", b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
