// face_decision_tb: self-checking test of the face / non-face decision.
//
// Network outputs and thresholds are drawn around the -1..1 output range
// (default 16-bit format); the expected decision is worked out from real
// values (face when output >= threshold) and the difference is compared
// with fp_ref_pkg's truncated O - threshold. Ties, outputs one unit in the
// last place either side of the threshold, and the results must arrive
// five clocks after the inputs.
module face_decision_tb;
  import fp_ref_pkg::*;
  typedef fp_ref #(6, 9) rr;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid, out_valid, face;
  logic [15:0] o, threshold, diff;

  face_decision dut (.*);

  int checks = 0, failures = 0, n_face = 0, n_non = 0;
  longint cyc = 0;
  logic [15:0] qd [$];
  logic        qf [$];
  longint      qt [$];
  always_ff @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (!rst && in_valid) qt.push_back(cyc);

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      logic [15:0] ed; logic ef; longint t;
      ed = qd.pop_front(); ef = qf.pop_front(); t = qt.pop_front();
      checks += 3;
      if (face !== ef) begin failures++; $display("FAIL face %0b exp %0b", face, ef); end
      if (diff !== ed) begin failures++; $display("FAIL diff %h exp %h", diff, ed); end
      if (cyc - t != 5) begin failures++; $display("FAIL latency"); end
      if (face) n_face++; else n_non++;
    end
  end

  initial begin
    in_valid = 1'b0; o = '0; threshold = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < 5000; n++) begin
      logic [15:0] x, t;
      x = rr::rand_val(-8, 0);
      case (n % 4)
        0: t = x;                                            // tie
        1: begin t = x; t[14:0] = t[14:0] + 15'd1; end      // one ulp larger magnitude
        2: begin t = x; t[14:0] = t[14:0] - 15'd1; end      // one ulp smaller magnitude
        default: t = rr::rand_val(-8, 0);
      endcase
      o <= x; threshold <= t; in_valid <= 1'b1;
      qf.push_back(rr::to_real(x) >= rr::to_real(t));
      qd.push_back(rr::add(x, {~t[15], t[14:0]}));
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
    checks += 2;
    if (n_face == 0 || n_non == 0) failures++;
    if (qf.size() != 0) failures++;
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
