// fp_mac: floating-point multiply-accumulate unit, acc <= acc + a * b.
//
// One fp_mul (two stages) and one fp_add (five stages) are chained. Because
// every addition needs the previous sum, accumulation is sequential in
// operand order, exactly like the software sum_i W_ij * X_i. The multiplier
// works in parallel with the adder: while one product is being added, the
// next pair is already being multiplied and waits in a product register.
// When the adder delivers a sum in the same cycle a product is waiting, the
// sum is forwarded straight back into the adder (bypass) instead of first
// being written to the accumulator register, so a steady stream costs one
// adder latency (5 clocks) per term.
//
// Interface:
//   clear              set the accumulator to +0; allowed only while !busy
//   in_valid/in_ready  valid/ready handshake for the operand pair a, b;
//                      a pair is taken on a clock edge where both are high,
//                      and in_valid, a and b must stay stable until then
//   acc                accumulator; final once busy is low after the last pair
//   busy               an accepted pair has not yet reached the accumulator
// Synchronous active-high reset empties the unit and sets acc to +0.
//
// The thesis shares one MAC, made of an FPU multiplication and an FPU
// addition working in parallel, between both network layers; the handshake,
// the product register and the bypass are this design's.
module fp_mac #(
  parameter int unsigned EXP_W  = 6,
  parameter int unsigned FRAC_W = 9
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   clear,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [EXP_W+FRAC_W:0]  a,
  input  logic [EXP_W+FRAC_W:0]  b,
  output logic [EXP_W+FRAC_W:0]  acc,
  output logic                   busy
);

  localparam int unsigned W = EXP_W + FRAC_W + 1;

  logic         accept, issue, fwd;
  logic         pend, prod_v, add_busy;
  logic [W-1:0] prod_q, acc_q;
  logic         mul_ov, add_ov;
  logic [W-1:0] mul_y, add_y;
  logic         pvalid, add_free;
  logic [W-1:0] pval, acc_src;

  assign in_ready = !pend;
  assign accept   = in_valid && in_ready;

  fp_mul #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_mul (
    .clk(clk), .rst(rst), .in_valid(accept), .a(a), .b(b),
    .out_valid(mul_ov), .y(mul_y)
  );

  always_comb begin
    pvalid   = prod_v || mul_ov;
    pval     = prod_v ? prod_q : mul_y;
    add_free = !add_busy || add_ov;
    fwd      = add_ov;                  // sum taken from the adder output
    acc_src  = add_ov ? add_y : acc_q;
    issue    = pvalid && add_free;
  end

  fp_add #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_add (
    .clk(clk), .rst(rst), .in_valid(issue), .a(acc_src), .b(pval),
    .out_valid(add_ov), .y(add_y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pend     <= 1'b0;
      prod_v   <= 1'b0;
      add_busy <= 1'b0;
      acc_q    <= '0;
    end else begin
      if (accept)     pend <= 1'b1;
      else if (issue) pend <= 1'b0;

      if (issue)       prod_v <= 1'b0;
      else if (mul_ov) prod_v <= 1'b1;
      if (mul_ov && !issue) prod_q <= mul_y;

      if (issue)       add_busy <= 1'b1;
      else if (add_ov) add_busy <= 1'b0;

      if (clear)       acc_q <= '0;
      else if (add_ov) acc_q <= add_y;
    end
  end

  assign acc  = acc_q;
  assign busy = pend || add_busy;

  // handshake rules
  a_clear_idle : assert property (@(posedge clk) disable iff (rst) clear |-> !busy)
    else $error("fp_mac: clear while busy");
  a_hold : assert property (@(posedge clk) disable iff (rst)
                            in_valid && !in_ready |=> in_valid && $stable(a) && $stable(b))
    else $error("fp_mac: operands changed before they were taken");
  a_fwd_only_when_issue : assert property (@(posedge clk) disable iff (rst)
                            fwd && pvalid |-> issue);

endmodule
