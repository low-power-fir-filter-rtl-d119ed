// booth_mult_tb: checks the radix-4 Booth multiplier against the product
// computed with 64-bit integer arithmetic, for the corner operands
// (0, +-1, most positive, most negative) in all pairings and for 20000 random
// pairs. Combinational block: each check waits 1 ns after applying inputs.
module booth_mult_tb;
  localparam int W = 16;
  logic signed [W-1:0]   a, b;
  logic signed [2*W-1:0] p;
  int checks = 0, failures = 0;

  booth_mult #(.W(W)) dut (.a, .b, .p);

  task automatic check(input logic signed [W-1:0] ta, tb_);
    longint expv;
    a = ta; b = tb_;
    #1;
    expv = longint'(ta) * longint'(tb_);
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d exp=%0d", ta, tb_, p, expv);
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
    logic signed [W-1:0] corner [6];
    corner = '{16'sd0, 16'sd1, -16'sd1, 16'sd32767, -16'sd32768, 16'sd12164};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    repeat (20000) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
