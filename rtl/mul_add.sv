// mul_add: the multiply-add datapath shared by both filter forms,
//   result = alpha + beta * gamma   (modulo 2^(2W)).
//
// beta is the coefficient (h), gamma the data sample (x) and alpha the value
// fed back: the accumulator register in the direct form, a partial sum read
// from the ring in the transpose form. The product comes from the radix-4
// Booth multiplier. Combinational; the registers around it live in the cores.
//
// Ports: alpha signed 2W, beta and gamma signed W, result signed 2W.
// Overflow wraps (two's complement), as an accumulator of width 2W does.
module mul_add #(
  parameter int W = 16
) (
  input  logic signed [2*W-1:0] alpha,
  input  logic signed [W-1:0]   beta,
  input  logic signed [W-1:0]   gamma,
  output logic signed [2*W-1:0] result
);

  logic signed [2*W-1:0] prod;

  booth_mult #(.W(W)) u_mult (
    .a(beta),
    .b(gamma),
    .p(prod)
  );

  assign result = alpha + prod;

endmodule
