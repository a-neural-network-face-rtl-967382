// nn_precision_sweep_tb: the full-size detector (400/300/1) at seven number
// formats side by side: FPU32 (1/8/23), FPU24 (1/6/17), FPU20 (1/6/13),
// FPU18 (1/6/11), FPU16 (1/6/9, the default), FPU14 (1/6/7) and FPU12
// (1/6/5).
//
// One set of real-valued weights (uniform in +-0.1) and one real image
// (uniform in +-1) is drawn. Each format receives the values truncated into
// that format and runs one frame. For each format the testbench checks that
// the output O_k and the decision are bit-exact against fp_ref_pkg at that
// width, and that the frame length is the expected number of clocks. It
// then prints the output error |O_k - O_k(double precision)| for every
// width and checks that the error grows as the fraction shrinks by four
// bits at a time (FPU32 -> FPU20 -> FPU16 -> FPU12). The error should grow
// by about 2x per fraction bit removed.
module nn_precision_sweep_tb;
  import fp_ref_pkg::*;
  import nn_pkg::*;

  localparam int NF = 7;
  localparam int EWS [NF] = '{8, 6, 6, 6, 6, 6, 6};
  localparam int FWS [NF] = '{23, 17, 13, 11, 9, 7, 5};
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
  real xr [N_IN];
  real y_double;
  real err [NF];
  bit  data_ready = 1'b0;
  bit  fmt_done [NF];

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
      logic [W-1:0] acc, coef, ok_ref, hid [N_HID];
      longint t0;
      start = 1'b0; wt_we = 1'b0; img_we = 1'b0; threshold = '0;
      wt_wdata = '0; img_wdata = '0; wt_addr = '0; img_addr = '0;
      wait (data_ready);
      @(posedge clk);
      for (int k = 0; k < WDEPTH; k++) begin
        wq[k] = rr::from_real(wr[k]);
        wt_we <= 1'b1; wt_addr <= WAW'(k); wt_wdata <= wq[k];
        @(posedge clk);
      end
      wt_we <= 1'b0;
      for (int k = 0; k < N_IN; k++) begin
        xq[k] = rr::from_real(xr[k]);
        img_we <= 1'b1; img_addr <= IAW'(k); img_wdata <= xq[k];
        @(posedge clk);
      end
      img_we <= 1'b0;
      // bit-exact expectation at this width
      coef = rr::from_real(0.75);
      for (int j = 0; j < N_HID; j++) begin
        acc = '0;
        for (int i = 0; i < N_IN; i++) acc = rr::add(acc, rr::mul(wq[j*N_IN + i], xq[i]));
        hid[j] = rr::mul(acc, coef);
      end
      acc = '0;
      for (int j = 0; j < N_HID; j++) acc = rr::add(acc, rr::mul(wq[N_IN*N_HID + j], hid[j]));
      ok_ref = rr::mul(acc, coef);
      threshold <= rr::from_real(0.5);
      start <= 1'b1;
      @(posedge clk);
      t0 = cyc;
      while (!done) @(posedge clk);
      check(cyc - t0 == FRAME_CLK - 1, $sformatf("FPU%0d frame length", W));
      check(y_out === ok_ref, $sformatf("FPU%0d output %h expected %h", W, y_out, ok_ref));
      check(face_dec === !rr::add(ok_ref, rr::from_real(-0.5))[W-1],
            $sformatf("FPU%0d decision", W));
      err[g] = rr::to_real(y_out) - y_double;
      if (err[g] < 0.0) err[g] = -err[g];
      start <= 1'b0;
      @(posedge clk);
      fmt_done[g] = 1'b1;
    end
  end

  initial begin
    real h [N_HID];
    real acc;
    bit  all;
    for (int k = 0; k < WDEPTH; k++) wr[k] = (real'($urandom()) / 4294967296.0 * 2.0 - 1.0) * 0.1;
    for (int k = 0; k < N_IN; k++)   xr[k] = real'($urandom()) / 4294967296.0 * 2.0 - 1.0;
    for (int j = 0; j < N_HID; j++) begin
      acc = 0.0;
      for (int i = 0; i < N_IN; i++) acc += wr[j*N_IN + i] * xr[i];
      h[j] = 0.75 * acc;
    end
    acc = 0.0;
    for (int j = 0; j < N_HID; j++) acc += wr[N_IN*N_HID + j] * h[j];
    y_double = 0.75 * acc;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    data_ready = 1'b1;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int g = 0; g < NF; g++) if (!fmt_done[g]) all = 1'b0;
    end while (!all);
    $display("double-precision output %f", y_double);
    for (int g = 0; g < NF; g++)
      $display("FPU%0d (1/%0d/%0d): |output error| = %e (MRRE 2^-%0d = %e)",
               1 + EWS[g] + FWS[g], EWS[g], FWS[g], err[g], FWS[g], 2.0 ** (-FWS[g]));
    check(err[0] <= err[2], "error FPU32 <= FPU20");
    check(err[2] <= err[4], "error FPU20 <= FPU16");
    check(err[4] <= err[6], "error FPU16 <= FPU12");
    check(err[0] < 1.0e-3, "FPU32 close to double precision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WDEPTH + N_IN + FRAME_CLK + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
