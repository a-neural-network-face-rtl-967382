// fp_mul: bit-width reduced floating-point multiplier, two pipeline stages.
//
// Numbers are sign / exponent / fraction with a hidden leading one and an
// exponent bias of 2^(EXP_W-1)-1, as in IEEE 754 single precision but with
// adjustable field widths (default 1/6/9, the 16-bit format). Encodings:
//   exponent all zeros  -> zero (the fraction is ignored; no denormals)
//   exponent all ones   -> infinity / not-a-number; any such operand makes
//                          the result infinity (exponent and fraction all
//                          ones) with the product's sign
// Stage 1 forms the exact (FRAC_W+1)x(FRAC_W+1) significand product, the
// integer product an FPGA hard multiplier block provides, together with the
// sign and the unbiased exponent sum. Stage 2 normalises the product (it lies
// in [1,4)), truncates it to FRAC_W fraction bits (round toward zero), and
// saturates: an exponent above the largest finite one gives infinity, one
// below 1 gives a signed zero.
//
// Interface: in_valid/a/b are sampled on a rising clock edge; out_valid/y
// appear two edges later. A new operation may start every cycle. There is no
// back-pressure. Synchronous active-high reset clears the valid pipeline.
//
// The two-clock latency, the use of a hard multiplier and truncation
// rounding follow the thesis; the handling of zero, infinity, overflow and
// underflow is this design's choice.
module fp_mul #(
  parameter int unsigned EXP_W  = 6,
  parameter int unsigned FRAC_W = 9
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic [EXP_W+FRAC_W:0]     a,
  input  logic [EXP_W+FRAC_W:0]     b,
  output logic                      out_valid,
  output logic [EXP_W+FRAC_W:0]     y
);

  localparam int unsigned W    = EXP_W + FRAC_W + 1;
  localparam int unsigned MW   = FRAC_W + 1;          // significand width
  localparam int unsigned PW   = 2 * MW;              // product width
  localparam int signed   BIAS = (2 ** (EXP_W - 1)) - 1;
  localparam int signed   EMAX = (2 ** EXP_W) - 1;    // reserved exponent
  localparam int unsigned XW   = EXP_W + 3;           // signed exponent width

  // ---- stage 1: unpack, significand product, exponent sum --------------
  logic [EXP_W-1:0] ea, eb;
  logic             a_zero, b_zero, a_spec, b_spec;

  assign ea     = a[W-2 -: EXP_W];
  assign eb     = b[W-2 -: EXP_W];
  assign a_zero = (ea == '0);
  assign b_zero = (eb == '0);
  assign a_spec = (ea == '1);
  assign b_spec = (eb == '1);

  logic                 s1_valid, s1_sign, s1_zero, s1_spec;
  logic signed [XW-1:0] s1_exp;
  logic [PW-1:0]        s1_prod;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
    end else begin
      s1_valid <= in_valid;
    end
    s1_sign <= a[W-1] ^ b[W-1];
    s1_zero <= a_zero | b_zero;
    s1_spec <= a_spec | b_spec;
    s1_exp  <= XW'($signed({3'b000, ea})) + XW'($signed({3'b000, eb})) - XW'(BIAS);
    s1_prod <= PW'({1'b1, a[FRAC_W-1:0]}) * PW'({1'b1, b[FRAC_W-1:0]});
  end

  // ---- stage 2: normalise, truncate, saturate, pack ---------------------
  logic                 top;
  logic signed [XW-1:0] n_exp;
  logic [FRAC_W-1:0]    n_frac;
  logic [W-1:0]         res;

  always_comb begin
    top    = s1_prod[PW-1];
    n_exp  = s1_exp + XW'($signed({1'b0, top}));
    n_frac = top ? s1_prod[PW-2 -: FRAC_W] : s1_prod[PW-3 -: FRAC_W];
    if (s1_spec || (n_exp >= XW'(EMAX))) begin
      res = {s1_sign, {(W-1){1'b1}}};
    end else if (s1_zero || (n_exp < XW'(1))) begin
      res = {s1_sign, {(W-1){1'b0}}};
    end else begin
      res = {s1_sign, n_exp[EXP_W-1:0], n_frac};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= s1_valid;
    end
    y <= res;
  end

endmodule
