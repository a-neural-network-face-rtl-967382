// fp_act: activation function of the network, y = 0.75 * x.
//
// The network was trained with the hyperbolic-tangent sigmoid; in hardware
// that transcendental function is replaced by its first-degree polynomial
// estimate f(x) = 0.75 * x, which holds well for the |x| < 1 range the
// trained network works in. The product is formed with the reduced-precision
// floating-point multiplier, so latency and rounding are those of fp_mul:
// in_valid/x sampled on a rising edge, out_valid/y two edges later, one
// value per clock, truncation rounding.
//
// The polynomial and the use of an FPU multiplication follow the thesis. The
// constant 0.75 is encoded as 1.1b x 2^-1 in the chosen format.
module fp_act #(
  parameter int unsigned EXP_W  = 6,
  parameter int unsigned FRAC_W = 9
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic [EXP_W+FRAC_W:0]  x,
  output logic                   out_valid,
  output logic [EXP_W+FRAC_W:0]  y
);

  localparam int unsigned BIAS = (2 ** (EXP_W - 1)) - 1;
  // 0.75 = 1.1b x 2^-1: sign 0, exponent BIAS-1, fraction 100...0
  localparam logic [EXP_W+FRAC_W:0] COEF =
    {1'b0, EXP_W'(BIAS - 1), 1'b1, {(FRAC_W-1){1'b0}}};

  fp_mul #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_mul (
    .clk(clk), .rst(rst), .in_valid(in_valid), .a(x), .b(COEF),
    .out_valid(out_valid), .y(y)
  );

endmodule
