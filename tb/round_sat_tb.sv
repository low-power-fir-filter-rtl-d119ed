// round_sat_tb: checks round-half-up at bit 15 and saturation to 16 bits
// against a reference written with integer division on non-negative offsets.
module round_sat_tb;
  localparam int W = 16;
  logic signed [2*W-1:0] din;
  logic signed [W-1:0]   dout;
  int checks = 0, failures = 0, sat_hits = 0;

  round_sat #(.W(W)) dut (.din, .dout);

  function automatic longint ref_round(longint v);
    // floor((v + 2^14) / 2^15) computed via an offset that keeps it positive
    longint q = (v + 16384 + (longint'(1) << 40)) / 32768 - (longint'(1) << 25);
    if (q > 32767)  q = 32767;
    if (q < -32768) q = -32768;
    return q;
  endfunction

  task automatic check(input logic signed [2*W-1:0] v);
    longint e;
    din = v;
    #1;
    e = ref_round(longint'(v));
    if (e == 32767 || e == -32768) sat_hits++;
    checks++;
    if (longint'(dout) != e) begin
      failures++;
      if (failures < 10) $display("FAIL din=%0d dout=%0d exp=%0d", v, dout, e);
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
    check(0); check(16384); check(16383); check(-16384); check(-16385);
    check(32768); check(-32768); check(49152); check(-49152);
    check(32'sh3fff_bfff); check(32'sh3fff_c000); check(32'sh7fff_ffff);
    check(-32'sh4000_0000); check(-32'sh4000_4001); check(32'sh8000_0000);
    repeat (10000) check((2*W)'($urandom));
    repeat (10000) check((2*W)'(int'($urandom_range(0, 1 << 24)) - (1 << 23)));
    if (sat_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
