// accu_memory_tb: checks the partial-sum ring as a delay store. With order
// {0,3,1,5,2,4} (N = 6) the testbench works out, per step k, how many steps
// earlier the needed word was written: L = N + k - slot(j+1) for
// coefficient j < N-1, and for j = N-1 the distance to the slot of h0 (same
// sample if earlier, else the previous one). The depth must be max(L)+1.
// Random words are written on random steps; every step compares rd_data with
// the word written L steps before (zero before that) and w_addr with the
// step count modulo the depth.
module accu_memory_tb;
  import fir_pkg::*;
  localparam int N = 6, W = 16;
  localparam logic [N-1:0][IDX_W-1:0] ORD = {8'd4, 8'd2, 8'd5, 8'd1, 8'd3, 8'd0};

  function automatic int slot(int j);
    for (int k = 0; k < N; k++) if (ORD[k] == j) return k;
    return -1;
  endfunction

  function automatic int life(int k);
    int j = ORD[k];
    if (j < N - 1) return N + k - slot(j + 1);
    if (slot(0) < k) return k - slot(0);
    return N + k - slot(0);
  endfunction

  function automatic int depth();
    int m = 0;
    for (int k = 0; k < N; k++) if (life(k) > m) m = life(k);
    return m + 1;
  endfunction

  localparam int M  = depth();
  localparam int AW = $clog2(M);

  logic clk = 0, rst_n = 0, step = 0;
  logic signed [2*W-1:0] wr_data = '0, rd_data;
  logic [AW-1:0] w_addr, rd_addr;
  logic [2*W-1:0] log_q [$];
  int checks = 0, failures = 0, t = 0, l;
  logic [2*W-1:0] expv;

  accu_memory #(.N(N), .W(W), .ORDER(ORD)) dut (.*);

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
    repeat (1500) begin
      @(negedge clk);
      step    = ($urandom % 4) != 0;
      wr_data = (2*W)'($urandom);
      #1;
      l    = life(t % N);
      expv = (t >= l) ? log_q[t - l] : '0;
      checks += 2;
      if (rd_data !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d L=%0d got %h exp %h", t, l, rd_data, expv);
      end
      if (int'(w_addr) != t % M) failures++;
      @(posedge clk);
      if (step) begin
        log_q.push_back(wr_data);
        t++;
      end
    end
    $display("depth %0d", M);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
