// data_memory_tb: random writes and read steps on an 8-word data ring with
// read order (3k+1) mod 8. A shift-register model of the sample history
// (hist[j] = j-th most recent sample, zero before any write) gives the
// expected read value hist[order[r]] every cycle, r being the read-step count
// modulo 8. Writes and reads in the same cycle are included.
module data_memory_tb;
  import fir_pkg::*;
  localparam int N = 8, W = 16;

  function automatic logic [N-1:0][IDX_W-1:0] perm();
    logic [N-1:0][IDX_W-1:0] o;
    for (int k = 0; k < N; k++) o[k] = IDX_W'((3 * k + 1) % N);
    return o;
  endfunction

  localparam logic [N-1:0][IDX_W-1:0] ORD = perm();

  logic clk = 0, rst_n = 0, wr = 0, step = 0;
  logic signed [W-1:0] x_in = '0, x_out;
  logic signed [W-1:0] hist [N];
  int checks = 0, failures = 0, r = 0, writes = 0, both = 0;

  data_memory #(.N(N), .W(W), .ORDER(ORD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[j]) hist[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk);
      wr   = ($urandom % 4) == 0;
      step = 1'($urandom);
      x_in = W'($urandom);
      #1;
      checks++;
      if (x_out !== hist[ORD[r]]) begin
        failures++;
        if (failures < 10) $display("FAIL r=%0d got %0d exp %0d", r, x_out, hist[ORD[r]]);
      end
      @(posedge clk);
      if (wr) begin
        for (int j = N - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = x_in;
        writes++;
        if (step) both++;
      end
      if (step) r = (r + 1) % N;
    end
    if (writes < N || both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
