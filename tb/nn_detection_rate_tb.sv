// nn_detection_rate_tb: detection rate against decision threshold for the
// full-size detector (400/300/1) at six number formats: FPU32 (1/8/23),
// FPU24, FPU20, FPU18, FPU16 (the default) and FPU12 (all 1/6/FRAC_W).
//
// No face database ships with this RTL, so the testbench generates a
// labelled two-class set with the same character: a hidden 400-pixel
// template T (pixels +-1); a "face" window is a*T plus uniform noise with a
// strength a in [0.2, 1.6]; a "non-face" window uses a in [-1.4, 0.6]. The
// network weights are built to respond to T: W1[j][i] = g_j*T[i]/400 plus
// small random terms, and W2[j] = k*g_j with k chosen so that the output
// is about 0.9*a. Faces therefore land near +0.9 and non-faces near -0.9,
// with overlap, much like a network trained toward +-0.9.
//
// Every format loads the same real weights, truncated into it, and runs
// every window once. The hardware threshold for window n is
// 0.1*((n mod 10)+1). For every frame the testbench checks:
//   - the output O_k bit-exact against fp_ref_pkg at that width;
//   - the face decision against the reference subtraction's sign;
//   - the frame length in clocks.
// From the outputs it then forms the detection rate (windows classified
// correctly, faces and non-faces together) for thresholds 0.1 to 1.0,
// using the detector's own decision rule (sign of O_k - threshold in that
// format). It prints a table with the double-precision rates and, per
// format, the average absolute difference from them. It checks that FPU32
// agrees with double precision and that FPU12 differs at least as much as
// FPU32.
module nn_detection_rate_tb;
  import fp_ref_pkg::*;
  import nn_pkg::*;

  localparam int NF    = 6;
  localparam int EWS [NF] = '{8, 6, 6, 6, 6, 6};
  localparam int FWS [NF] = '{23, 17, 13, 11, 9, 5};
  localparam int N_IMG = 20;
  localparam int N_TH  = 10;
  localparam int N_IN   = NN_N_IN;
  localparam int N_HID  = NN_N_HID;
  localparam int WDEPTH = N_IN * N_HID + N_HID;
  localparam int WAW    = $clog2(WDEPTH);
  localparam int IAW    = $clog2(N_IN);
  localparam int FRAME_CLK = 5 * (N_IN * N_HID + N_HID) + 10 * N_HID + 17;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  real wr [WDEPTH];
  real xr [N_IMG][N_IN];
  bit  is_face [N_IMG];
  real y_double [N_IMG];
  // correct[f][t]: windows classified correctly by format f at threshold t
  int  correct [NF][N_TH];
  bit  data_ready = 1'b0;
  bit  fmt_done [NF];

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom()) / 4294967296.0);
  endfunction

  function automatic real th_of(int t);
    return 0.1 * real'(t + 1);
  endfunction

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  for (genvar g = 0; g < NF; g++) begin : g_fmt
    localparam int EW = EWS[g];
    localparam int FW = FWS[g];
    localparam int W  = 1 + EW + FW;
    typedef fp_ref #(EW, FW) rr;

    logic           start, wt_we, img_we, done, face_dec;
    logic [W-1:0]   threshold, wt_wdata, img_wdata, y_out;
    logic [WAW-1:0] wt_addr;
    logic [IAW-1:0] img_addr;
    logic [2:0]     stage;

    nn_face_detector #(.EXP_W(EW), .FRAC_W(FW)) dut (.*);

    logic [W-1:0] wq [WDEPTH];
    logic [W-1:0] xq [N_IN];

    initial begin
      logic [W-1:0] acc, coef, y_ref, th_q, hid [N_HID];
      longint t0;
      start = 1'b0; wt_we = 1'b0; img_we = 1'b0; threshold = '0;
      wt_wdata = '0; img_wdata = '0; wt_addr = '0; img_addr = '0;
      for (int t = 0; t < N_TH; t++) correct[g][t] = 0;
      wait (data_ready);
      @(posedge clk);
      for (int k = 0; k < WDEPTH; k++) begin
        wq[k] = rr::from_real(wr[k]);
        wt_we <= 1'b1; wt_addr <= WAW'(k); wt_wdata <= wq[k];
        @(posedge clk);
      end
      wt_we <= 1'b0;
      coef = rr::from_real(0.75);
      for (int n = 0; n < N_IMG; n++) begin
        for (int k = 0; k < N_IN; k++) begin
          xq[k] = rr::from_real(xr[n][k]);
          img_we <= 1'b1; img_addr <= IAW'(k); img_wdata <= xq[k];
          @(posedge clk);
        end
        img_we <= 1'b0;
        // bit-exact expectation at this width
        for (int j = 0; j < N_HID; j++) begin
          acc = '0;
          for (int i = 0; i < N_IN; i++) acc = rr::add(acc, rr::mul(wq[j*N_IN + i], xq[i]));
          hid[j] = rr::mul(acc, coef);
        end
        acc = '0;
        for (int j = 0; j < N_HID; j++) acc = rr::add(acc, rr::mul(wq[N_IN*N_HID + j], hid[j]));
        y_ref = rr::mul(acc, coef);
        th_q  = rr::from_real(th_of(n % N_TH));
        threshold <= th_q;
        start <= 1'b1;
        @(posedge clk);
        t0 = cyc;
        while (!done) @(posedge clk);
        check(cyc - t0 == longint'(FRAME_CLK - 1), $sformatf("FPU%0d window %0d frame length", W, n));
        check(y_out === y_ref,
              $sformatf("FPU%0d window %0d output %h expected %h", W, n, y_out, y_ref));
        check(face_dec === !rr::add(y_ref, {~th_q[W-1], th_q[W-2:0]})[W-1],
              $sformatf("FPU%0d window %0d decision", W, n));
        // detection at every threshold with the detector's decision rule
        for (int t = 0; t < N_TH; t++) begin
          logic [W-1:0] tq;
          bit face;
          tq   = rr::from_real(th_of(t));
          face = !rr::add(y_out, {~tq[W-1], tq[W-2:0]})[W-1];
          if (face == is_face[n]) correct[g][t]++;
        end
        start <= 1'b0;
        @(posedge clk);
      end
      fmt_done[g] = 1'b1;
    end
  end

  initial begin
    real tmpl [N_IN];
    real gain [N_HID];
    real h [N_HID];
    real acc, ssum, kk, a, rate_d, diff, avg [NF];
    int  corr_d [N_TH];
    bit  all;
    string line;
    // network
    for (int i = 0; i < N_IN; i++) tmpl[i] = ($urandom() % 2 == 1) ? 1.0 : -1.0;
    ssum = 0.0;
    for (int j = 0; j < N_HID; j++) begin
      gain[j] = urand(0.5, 1.5);
      ssum += gain[j] * gain[j];
      for (int i = 0; i < N_IN; i++)
        wr[j*N_IN + i] = gain[j] * tmpl[i] / real'(N_IN) + urand(-0.02, 0.02);
    end
    kk = 0.9 / (0.5625 * ssum);
    for (int j = 0; j < N_HID; j++) wr[N_IN*N_HID + j] = kk * gain[j];
    // windows: alternate faces and non-faces
    for (int n = 0; n < N_IMG; n++) begin
      is_face[n] = (n % 2 == 0);
      a = is_face[n] ? urand(0.2, 1.6) : urand(-1.4, 0.6);
      for (int i = 0; i < N_IN; i++) xr[n][i] = a * tmpl[i] + urand(-0.6, 0.6);
      for (int j = 0; j < N_HID; j++) begin
        acc = 0.0;
        for (int i = 0; i < N_IN; i++) acc += wr[j*N_IN + i] * xr[n][i];
        h[j] = 0.75 * acc;
      end
      acc = 0.0;
      for (int j = 0; j < N_HID; j++) acc += wr[N_IN*N_HID + j] * h[j];
      y_double[n] = 0.75 * acc;
    end
    for (int t = 0; t < N_TH; t++) begin
      corr_d[t] = 0;
      for (int n = 0; n < N_IMG; n++)
        if ((y_double[n] >= th_of(t)) == is_face[n]) corr_d[t]++;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    data_ready = 1'b1;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int g = 0; g < NF; g++) if (!fmt_done[g]) all = 1'b0;
    end while (!all);
    // report: detection rate in percent per threshold
    line = "threshold   ";
    for (int t = 0; t < N_TH; t++) line = {line, $sformatf("%6.1f", th_of(t))};
    $display("%s   avg |diff|", line);
    line = "double      ";
    for (int t = 0; t < N_TH; t++) line = {line, $sformatf("%6.1f", 100.0 * corr_d[t] / N_IMG)};
    $display("%s", line);
    for (int g = 0; g < NF; g++) begin
      line = $sformatf("FPU%-2d       ", 1 + EWS[g] + FWS[g]);
      avg[g] = 0.0;
      for (int t = 0; t < N_TH; t++) begin
        rate_d = 100.0 * corr_d[t] / N_IMG;
        diff   = 100.0 * correct[g][t] / N_IMG - rate_d;
        avg[g] += (diff < 0.0 ? -diff : diff) / N_TH;
        line = {line, $sformatf("%6.1f", 100.0 * correct[g][t] / N_IMG)};
      end
      $display("%s   %5.2f", line, avg[g]);
    end
    // FPU32 may differ from double precision only for a window lying
    // within a few ulps of a threshold: allow one window in total.
    check(avg[0] * N_TH <= 100.0 / N_IMG, "FPU32 matches double-precision detection rates");
    check(avg[0] <= avg[NF-1], "FPU12 differs at least as much as FPU32");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WDEPTH + N_IMG * (N_IN + FRAME_CLK + 10) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
