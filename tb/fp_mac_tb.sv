// fp_mac_tb: self-checking test of the multiply-accumulate unit.
//
// Random dot products of random length (1 to 40 terms, default 16-bit
// format) are streamed into the MAC. Operand pairs are offered with random
// gaps, so that the unit sees both back-to-back traffic (stalls, and the
// adder-output bypass) and isolated terms. After each product the
// accumulator must equal the sequential reference sum computed with
// fp_ref_pkg, and a steady stream must take exactly 5 clocks per term.
module fp_mac_tb;
  import fp_ref_pkg::*;
  typedef fp_ref #(6, 9) rr;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic        clear, in_valid, in_ready, busy;
  logic [15:0] a, b, acc;

  fp_mac dut (.*);

  int checks = 0, failures = 0;
  int n_bypass = 0, n_stall = 0;
  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    if (dut.fwd && dut.issue) n_bypass++;
    if (in_valid && !in_ready) n_stall++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic dot(int n, bit gaps);
    logic [15:0] ref_acc;
    longint t0, t1;
    ref_acc = '0;
    @(negedge clk);
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    t0 = cyc;
    for (int k = 0; k < n; k++) begin
      logic [15:0] x, z;
      x = rr::rand_val(-6, 2);
      z = rr::rand_val(-6, 2);
      ref_acc = rr::add(ref_acc, rr::mul(x, z));
      if (gaps) repeat ($urandom_range(8)) @(negedge clk);
      in_valid = 1'b1; a = x; b = z;
      while (!in_ready) @(negedge clk);
      @(negedge clk);            // taken on the rising edge in between
      in_valid = 1'b0;
    end
    while (busy) @(negedge clk);
    t1 = cyc;
    check(acc === ref_acc, $sformatf("n=%0d acc %h expected %h", n, acc, ref_acc));
    // without gaps the stream costs 5 clocks per term plus a fixed overhead
    if (!gaps) check(t1 - t0 == 5 * n + 3, $sformatf("n=%0d took %0d clocks", n, t1 - t0));
  endtask

  initial begin
    clear = 1'b0; in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(acc === 16'h0000 && !busy, "reset state");
    for (int r = 0; r < 300; r++) dot(1 + int'($urandom_range(39)), r[0]);
    dot(400, 1'b0);
    check(n_bypass > 0, "bypass never used");
    check(n_stall > 0, "no stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
