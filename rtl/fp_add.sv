// fp_add: bit-width reduced floating-point adder, five pipeline stages.
//
// Same number format as fp_mul (sign / EXP_W exponent / FRAC_W fraction,
// hidden one, bias 2^(EXP_W-1)-1, exponent 0 = zero, exponent all ones =
// infinity). The five stages are those of the thesis' pipelined FPU:
//   S1 data fetch  register the operands
//   S2 pre-norm    order the operands by magnitude, align the smaller
//                  significand by the exponent difference, keeping a guard,
//                  a round and a sticky bit
//   S3 add         add or subtract the aligned significands
//   S4 post-norm   leading-one detection and normalising left/right shift,
//                  exponent adjustment
//   S5 round/norm  truncate to FRAC_W bits (round toward zero), saturate,
//                  pack
// With the guard/round/sticky bits the result equals the exact sum truncated
// toward zero. An exact zero sum is +0; an exponent above the largest finite
// one gives infinity (exponent and fraction all ones); an exponent below 1
// flushes to a signed zero. Any infinity operand gives infinity with the sign
// of the operand of larger magnitude.
//
// Interface: in_valid/a/b are sampled on a rising edge; out_valid/y appear
// five edges later. One operation may start every cycle; there is no
// back-pressure. Synchronous active-high reset clears the valid pipeline.
//
// The stage split and truncation rounding follow the thesis; the extra
// guard/round/sticky bits and the special-value rules are this design's.
module fp_add #(
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
  localparam int unsigned MW   = FRAC_W + 4;      // 1.f + guard, round, sticky
  localparam int unsigned SW   = MW + 1;          // sum with carry bit
  localparam int signed   EMAX = (2 ** EXP_W) - 1;
  localparam int unsigned XW   = EXP_W + 3;       // signed exponent width
  localparam int unsigned LZW  = $clog2(SW + 1);

  // ---- S1: data fetch ----------------------------------------------------
  logic         s1_valid;
  logic [W-1:0] s1_a, s1_b;

  always_ff @(posedge clk) begin
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= in_valid;
    s1_a <= a;
    s1_b <= b;
  end

  // ---- S2: pre-normalisation (swap and align) ---------------------------
  logic              a_ge_b;
  logic [W-1:0]      x, z;                 // x: larger magnitude, z: smaller
  logic [EXP_W-1:0]  ex, ez, diff;
  logic [MW-1:0]     mx, mz, mz_al;
  logic [2*MW-1:0]   wide;
  logic              sticky;
  int unsigned       sh;

  always_comb begin
    a_ge_b = (s1_a[W-2:0] >= s1_b[W-2:0]);
    x      = a_ge_b ? s1_a : s1_b;
    z      = a_ge_b ? s1_b : s1_a;
    ex     = x[W-2 -: EXP_W];
    ez     = z[W-2 -: EXP_W];
    mx     = (ex == '0) ? '0 : {1'b1, x[FRAC_W-1:0], 3'b000};
    mz     = (ez == '0) ? '0 : {1'b1, z[FRAC_W-1:0], 3'b000};
    diff   = ex - ez;
    sh     = (int'(diff) > int'(MW) + 1) ? MW + 1 : int'(diff);
    wide   = {mz, {MW{1'b0}}} >> sh;
    sticky = |wide[MW-1:0];
    mz_al  = wide[2*MW-1:MW] | {{(MW-1){1'b0}}, sticky};
  end

  logic             s2_valid, s2_sign, s2_sub, s2_spec;
  logic [EXP_W-1:0] s2_exp;
  logic [MW-1:0]    s2_mx, s2_mz;

  always_ff @(posedge clk) begin
    if (rst) s2_valid <= 1'b0;
    else     s2_valid <= s1_valid;
    s2_sign <= x[W-1];
    s2_sub  <= x[W-1] ^ z[W-1];
    s2_spec <= (ex == '1) || (ez == '1);
    s2_exp  <= ex;
    s2_mx   <= mx;
    s2_mz   <= mz_al;
  end

  // ---- S3: significand add / subtract ------------------------------------
  logic             s3_valid, s3_sign, s3_spec;
  logic [EXP_W-1:0] s3_exp;
  logic [SW-1:0]    s3_sum;

  always_ff @(posedge clk) begin
    if (rst) s3_valid <= 1'b0;
    else     s3_valid <= s2_valid;
    s3_sign <= s2_sign;
    s3_spec <= s2_spec;
    s3_exp  <= s2_exp;
    s3_sum  <= s2_sub ? ({1'b0, s2_mx} - {1'b0, s2_mz})
                      : ({1'b0, s2_mx} + {1'b0, s2_mz});
  end

  // ---- S4: post-normalisation (leading-one detect and shift) ------------
  logic [LZW-1:0]       lz;
  logic [SW-1:0]        norm;
  logic signed [XW-1:0] nexp;

  always_comb begin
    lz = LZW'(SW);
    for (int k = 0; k < SW; k++) begin
      if (s3_sum[k]) lz = LZW'(SW - 1 - k);
    end
    norm = s3_sum << lz;
    nexp = XW'($signed({3'b000, s3_exp})) + XW'(1) - XW'($signed({1'b0, lz}));
  end

  logic                 s4_valid, s4_sign, s4_spec, s4_zero;
  logic signed [XW-1:0] s4_exp;
  logic [FRAC_W-1:0]    s4_frac;

  always_ff @(posedge clk) begin
    if (rst) s4_valid <= 1'b0;
    else     s4_valid <= s3_valid;
    s4_sign <= s3_sign;
    s4_spec <= s3_spec;
    s4_zero <= (s3_sum == '0);
    s4_exp  <= nexp;
    s4_frac <= norm[SW-2 -: FRAC_W];   // truncation: bits below are dropped
  end

  // ---- S5: rounding (truncation), saturation and packing ----------------
  logic [W-1:0] res;

  always_comb begin
    if (s4_spec || (s4_exp >= XW'(EMAX))) begin
      res = {s4_sign, {(W-1){1'b1}}};
    end else if (s4_zero) begin
      res = '0;
    end else if (s4_exp < XW'(1)) begin
      res = {s4_sign, {(W-1){1'b0}}};
    end else begin
      res = {s4_sign, s4_exp[EXP_W-1:0], s4_frac};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= s4_valid;
    y <= res;
  end

endmodule
