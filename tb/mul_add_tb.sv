// mul_add_tb: checks result = alpha + beta*gamma (wrapping at 2W bits)
// against 64-bit integer arithmetic for extreme and 20000 random operands.
module mul_add_tb;
  localparam int W = 16;
  logic signed [2*W-1:0] alpha, result;
  logic signed [W-1:0]   beta, gamma;
  int checks = 0, failures = 0;

  mul_add #(.W(W)) dut (.alpha, .beta, .gamma, .result);

  task automatic check(input logic signed [2*W-1:0] ta, input logic signed [W-1:0] tb_, tg);
    longint sum;
    logic [2*W-1:0] expv;
    alpha = ta; beta = tb_; gamma = tg;
    #1;
    sum  = longint'(ta) + longint'(tb_) * longint'(tg);
    expv = sum[2*W-1:0];
    checks++;
    if (result !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d g=%0d r=%0d", ta, tb_, tg, result);
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
    check(0, 0, 0);
    check(32'sh7fffffff, 16'sd1, 16'sd1);          // wraps
    check(-32'sd5, -16'sd32768, -16'sd32768);
    check(32'sd1000, 16'sd12164, -16'sd3);
    repeat (20000) check((2*W)'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
