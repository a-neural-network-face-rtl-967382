// fp_act_tb: self-checking test of the activation unit y = 0.75 * x.
//
// Random inputs (default 16-bit format, plus a 32-bit instance) are issued
// one per clock; each output is compared with 0.75 * x from fp_ref_pkg
// (exact product truncated) and, for the ordinary range, with the real
// value 0.75 * x within one unit in the last place. Every result must
// arrive two clocks after its input.
module fp_act_tb;
  import fp_ref_pkg::*;
  typedef fp_ref #(6, 9)  r16;
  typedef fp_ref #(8, 23) r32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic        v_in, v16, v32;
  logic [15:0] x16, y16;
  logic [31:0] x32, y32;

  fp_act dut16 (.clk(clk), .rst(rst), .in_valid(v_in), .x(x16), .out_valid(v16), .y(y16));
  fp_act #(.EXP_W(8), .FRAC_W(23)) dut32 (.clk(clk), .rst(rst), .in_valid(v_in), .x(x32),
                                           .out_valid(v32), .y(y32));

  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [15:0] q16 [$];
  logic [31:0] q32 [$];
  real         qr  [$];
  longint      qt  [$];
  always_ff @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (!rst && v_in) qt.push_back(cyc);

  always @(posedge clk) begin
    if (!rst && v16) begin
      logic [15:0] e16; logic [31:0] e32; real er; longint t;
      e16 = q16.pop_front(); e32 = q32.pop_front(); er = qr.pop_front(); t = qt.pop_front();
      checks += 4;
      if (y16 !== e16) begin failures++; $display("FAIL16 %h exp %h", y16, e16); end
      if (!v32 || y32 !== e32) begin failures++; $display("FAIL32 %h exp %h", y32, e32); end
      if (cyc - t != 2) begin failures++; $display("FAIL latency %0d", cyc - t); end
      // truncation error is below one ulp (2^-9 relative) and never positive in magnitude
      if (!((r16::to_real(y16) - er) * (er < 0 ? -1.0 : 1.0) <= 0.0 &&
            (er - r16::to_real(y16)) * (er < 0 ? -1.0 : 1.0) < (er < 0 ? -er : er) * (2.0 ** -9)))
        begin failures++; $display("FAIL real %f vs %f", r16::to_real(y16), er); end
    end
  end

  initial begin
    v_in = 1'b0; x16 = '0; x32 = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < 5000; n++) begin
      logic [15:0] a; logic [31:0] b;
      a = r16::rand_val(-20, 20);
      b = r32::rand_val(-100, 100);
      x16 <= a; x32 <= b; v_in <= 1'b1;
      q16.push_back(r16::mul(a, r16::from_real(0.75)));
      q32.push_back(r32::mul(b, 32'h3F40_0000));
      qr.push_back(0.75 * r16::to_real(a));
      @(posedge clk);
    end
    v_in <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (q16.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
