// Shared body of the face-detector end-to-end testbenches. The including
// module defines N_IN, N_HID and FRAMES and imports fp_ref_pkg and nn_pkg.
// The DUT is instantiated with its default parameters when N_IN and N_HID
// equal the defaults, so the full-size test leaves the top untouched.

  typedef fp_ref #(FPU_EXP_W, FPU_FRAC_W) rr;
  localparam int W      = 1 + FPU_EXP_W + FPU_FRAC_W;
  localparam int WDEPTH = N_IN * N_HID + N_HID;
  localparam int WAW    = $clog2(WDEPTH);
  localparam int IAW    = $clog2(N_IN);
  // frame length in clocks from the edge that samples START to the edge
  // that raises DONE (see the stage timing of nn_face_detector)
  localparam int FRAME_CLK = 5 * (N_IN * N_HID + N_HID) + 10 * N_HID + 17;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic           start;
  logic [W-1:0]   threshold;
  logic           wt_we, img_we;
  logic [WAW-1:0] wt_addr;
  logic [IAW-1:0] img_addr;
  logic [W-1:0]   wt_wdata, img_wdata;
  logic           done, face_dec;
  logic [W-1:0]   y_out;
  logic [2:0]     stage;

  if (N_IN == NN_N_IN && N_HID == NN_N_HID) begin : g_dut
    nn_face_detector dut (.*);
  end else begin : g_dut
    nn_face_detector #(.N_IN(N_IN), .N_HID(N_HID)) dut (.*);
  end

  int checks = 0, failures = 0;
  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters -------------------------------------------------
  int stage_entries [7];
  int n_stall = 0, n_bypass = 0, n_face = 0, n_nonface = 0;
  logic [2:0] stage_q = 3'd0;
  always @(posedge clk) begin
    if (!rst) begin
      if (stage != stage_q) stage_entries[stage]++;
      stage_q <= stage;
      if (g_dut.dut.u_mac.in_valid && !g_dut.dut.u_mac.in_ready) n_stall++;
      if (g_dut.dut.u_mac.fwd && g_dut.dut.u_mac.issue) n_bypass++;
    end
  end

  // ---- data ---------------------------------------------------------------
  logic [W-1:0] wts [WDEPTH];
  logic [W-1:0] img [N_IN];
  logic [W-1:0] hid_ref [N_HID];
  logic [W-1:0] ok_ref;
  logic [W-1:0] coef;

  function automatic logic [W-1:0] reference();
    logic [W-1:0] acc;
    for (int j = 0; j < N_HID; j++) begin
      acc = '0;
      for (int i = 0; i < N_IN; i++) acc = rr::add(acc, rr::mul(wts[j*N_IN + i], img[i]));
      hid_ref[j] = rr::mul(acc, coef);
    end
    acc = '0;
    for (int j = 0; j < N_HID; j++) acc = rr::add(acc, rr::mul(wts[N_IN*N_HID + j], hid_ref[j]));
    return rr::mul(acc, coef);
  endfunction

  task automatic load_weights();
    for (int k = 0; k < WDEPTH; k++) begin
      wts[k] = rr::rand_val(-7, -3);
      wt_we <= 1'b1; wt_addr <= WAW'(k); wt_wdata <= wts[k];
      @(posedge clk);
    end
    wt_we <= 1'b0;
  endtask

  task automatic load_image();
    for (int k = 0; k < N_IN; k++) begin
      img[k] = rr::rand_val(-4, -1);
      img_we <= 1'b1; img_addr <= IAW'(k); img_wdata <= img[k];
      @(posedge clk);
    end
    img_we <= 1'b0;
  endtask

  // next representable value away from / toward zero (same sign)
  function automatic logic [W-1:0] step(logic [W-1:0] v, int d);
    logic [W-1:0] r;
    r = v;
    r[W-2:0] = r[W-2:0] + (W-1)'(d);
    return r;
  endfunction

  initial begin
    logic expect_face;
    longint t0, t1;
    coef = rr::from_real(0.75);
    start = 1'b0; threshold = '0; wt_we = 1'b0; img_we = 1'b0;
    wt_addr = '0; img_addr = '0; wt_wdata = '0; img_wdata = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    load_weights();
    for (int f = 0; f < FRAMES; f++) begin
      if (f % 3 == 0 || FRAMES < 3) load_image();
      ok_ref = reference();
      // threshold below, equal to, or above the expected output
      unique case (f % 3)
        0: threshold = ok_ref[W-1] ? step(ok_ref, 1) : step(ok_ref, -1);
        1: threshold = (FRAMES < 3) ? (ok_ref[W-1] ? step(ok_ref, -1) : step(ok_ref, 1)) : ok_ref;
        default: threshold = ok_ref[W-1] ? step(ok_ref, -1) : step(ok_ref, 1);
      endcase
      expect_face = !rr::add(ok_ref, {~threshold[W-1], threshold[W-2:0]})[W-1];
      start <= 1'b1;
      @(posedge clk);
      t0 = cyc;
      while (!done) @(posedge clk);
      t1 = cyc;
      check(t1 - t0 == FRAME_CLK - 1,
            $sformatf("frame length %0d clocks, expected %0d", t1 - t0 + 1, FRAME_CLK));
      check(stage == 3'(ST_SIX), "stage SIX at DONE");
      check(y_out === ok_ref, $sformatf("y_out %h expected %h", y_out, ok_ref));
      check(face_dec === expect_face, $sformatf("face_dec %0b expected %0b", face_dec, expect_face));
      for (int j = 0; j < N_HID; j++)
        check(g_dut.dut.u_hid.mem[j] === hid_ref[j],
              $sformatf("hidden %0d: %h expected %h", j, g_dut.dut.u_hid.mem[j], hid_ref[j]));
      if (expect_face) n_face++; else n_nonface++;
      @(posedge clk);
      check(!done, "DONE is a single-clock pulse");
      check(face_dec === expect_face, "FACE_DEC held while START is high");
      start <= 1'b0;
      @(posedge clk);
      @(posedge clk);
      check(stage == 3'(ST_ZERO) && !face_dec, "back to ZERO after START drops");
    end
    for (int s = 1; s <= 6; s++)
      check(stage_entries[s] == FRAMES, $sformatf("stage %0d entered %0d times", s, stage_entries[s]));
    check(n_stall > 0,   "MAC stall never happened");
    check(n_bypass > 0,  "adder bypass never happened");
    check(n_face > 0,    "no face decision");
    check(n_nonface > 0, "no non-face decision");
    $display("frames=%0d stalls=%0d bypasses=%0d faces=%0d nonfaces=%0d",
             FRAMES, n_stall, n_bypass, n_face, n_nonface);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WDEPTH + FRAMES * (FRAME_CLK + N_IN + 20) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
