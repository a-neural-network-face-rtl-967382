// face_decision: face / non-face classification of the network output.
//
// The output O_k is compared with a threshold by subtracting: the
// threshold's sign bit is inverted and the two are added in the
// reduced-precision floating-point adder. If the sign (most significant)
// bit of O_k - threshold is 1 the window is a non-face, otherwise a face;
// an exact tie gives +0 and so counts as a face.
//
// Interface: in_valid, o and threshold are sampled on a rising edge;
// out_valid, face and diff (the difference itself) appear five edges
// later, as in fp_add. Synchronous active-high reset.
//
// Subtraction through the FPU adder and the sign-bit rule follow the
// thesis; the handling of a tie follows from that rule.
module face_decision #(
  parameter int unsigned EXP_W  = 6,
  parameter int unsigned FRAC_W = 9
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic [EXP_W+FRAC_W:0]  o,
  input  logic [EXP_W+FRAC_W:0]  threshold,
  output logic                   out_valid,
  output logic                   face,
  output logic [EXP_W+FRAC_W:0]  diff
);

  localparam int unsigned W = EXP_W + FRAC_W + 1;

  logic [W-1:0] neg_thr;
  assign neg_thr = {~threshold[W-1], threshold[W-2:0]};

  fp_add #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_sub (
    .clk(clk), .rst(rst), .in_valid(in_valid), .a(o), .b(neg_thr),
    .out_valid(out_valid), .y(diff)
  );

  assign face = !diff[W-1];

endmodule
