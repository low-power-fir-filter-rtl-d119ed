// booth_mult: signed W x W -> 2W multiplier using radix-4 (modified) Booth
// recoding.
//
// The multiplier operand b is scanned in overlapping 3-bit groups
// {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0). Each group selects one partial
// product from {0, +a, +2a, -a, -2a}, weighted by 4^i; the W/2 partial
// products are summed. The filter cores use it as the multiplier of the
// multiply-add unit. A Booth multiplier is what the evaluated filters use; its
// internal (low power) structure is not specified, so this is the plain
// radix-4 form with a behavioural adder tree. Purely combinational.
//
// Ports: a (multiplicand) and b (multiplier) are signed W bits; p = a*b is
// signed 2W bits. W must be even.
module booth_mult #(
  parameter int W = 16
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  logic [W:0] b_ext;  // multiplier with the implicit b[-1] = 0 appended
  assign b_ext = {b, 1'b0};

  always_comb begin
    logic signed [2*W-1:0] a_x, pp, acc;
    a_x = (2*W)'(a);
    acc = '0;
    for (int i = 0; i < W / 2; i++) begin
      unique case (b_ext[2*i +: 3])
        3'b001, 3'b010: pp = a_x;
        3'b011:         pp = a_x <<< 1;
        3'b100:         pp = -(a_x <<< 1);
        3'b101, 3'b110: pp = -a_x;
        default:        pp = '0;   // 000, 111
      endcase
      acc = acc + (pp <<< (2 * i));
    end
    p = acc;
  end

  initial assert (W % 2 == 0) else $error("booth_mult: W must be even");

endmodule
