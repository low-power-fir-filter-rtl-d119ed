// round_sat: reduces a 2W-bit filter result to the W-bit output word.
//
// The result is rounded to nearest (half rounds up) at bit FRAC, then
// saturated to the W-bit signed range. With Q1.15 coefficients and integer
// data the accumulated sum carries 15 fractional bits, hence FRAC = W-1.
// The rounding step is part of the evaluated filters; its exact rule and the
// saturation are this design's choice. Combinational.
//
// Ports: din signed 2W bits, dout signed W bits.
module round_sat #(
  parameter int W    = 16,
  parameter int FRAC = W - 1
) (
  input  logic signed [2*W-1:0] din,
  output logic signed [W-1:0]   dout
);

  localparam logic signed [2*W:0] MAXV = (2*W+1)'((1 << (W - 1)) - 1);
  localparam logic signed [2*W:0] MINV = -(2*W+1)'(1 << (W - 1));

  logic signed [2*W:0] sum, shifted;

  always_comb begin
    sum     = (2*W+1)'(din) + ((2*W+1)'(1) <<< (FRAC - 1));
    shifted = sum >>> FRAC;
    if (shifted > MAXV)      dout = MAXV[W-1:0];
    else if (shifted < MINV) dout = MINV[W-1:0];
    else                     dout = shifted[W-1:0];
  end

endmodule
