// coeff_memory_tb: drives the coefficient memory with a non-sequential order
// (k*5 mod 24) and random step enables, and checks that after reset h_addr is
// 0 and that h always equals the coefficient the order names for the current
// step (the step count kept by the testbench, modulo 24).
module coeff_memory_tb;
  import fir_pkg::*;
  localparam int N = 24, W = 16;

  function automatic logic [N-1:0][IDX_W-1:0] perm();
    logic [N-1:0][IDX_W-1:0] o;
    for (int k = 0; k < N; k++) o[k] = IDX_W'((k * 5) % N);
    return o;
  endfunction

  logic clk = 0, rst_n = 0, step = 0;
  logic signed [W-1:0] h;
  logic [IDX_W-1:0] h_idx;
  logic [$clog2(N)-1:0] h_addr;
  int checks = 0, failures = 0, t = 0;

  coeff_memory #(.N(N), .W(W), .COEFFS(LP24), .ORDER(perm())) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (h_addr != 0) failures++;
    repeat (500) begin
      @(negedge clk);
      step = 1'($urandom);
      #1;
      checks++;
      if (h !== W'(lp24_coeff((t % N) * 5 % N)) || h_idx != IDX_W'((t % N) * 5 % N)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d h=%0d", t, h);
      end
      @(posedge clk);
      if (step) t++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
