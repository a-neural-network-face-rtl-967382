// nn_face_detector: two-layer perceptron face detector on a reduced-precision
// floating-point MAC.
//
// A 20x20 grey-scale window (400 inputs) is classified as face or non-face by
// a fully connected 400-300-1 network whose activation function is the
// polynomial f(x) = 0.75 x. All arithmetic is floating point in an adjustable
// format, 1/6/9 (16 bits) by default. Both layers share one multiply-
// accumulate unit (fp_mac), one activation unit (fp_act) and one decision
// unit (face_decision); a stage controller walks through the steps of a
// frame:
//   ZERO   idle; weights and the image may be loaded; START begins a frame
//   ONE    net_j = sum_i W_ij X_i for j = 0..N_HID-1, stored in the hidden
//          buffer
//   TWO    O_j = 0.75 net_j, written back in place
//   THREE  net_k = sum_j W_jk O_j
//   FOUR   O_k = 0.75 net_k (output y_out)
//   FIVE   sign of O_k - threshold
//   SIX    DONE is high for one clock on entry; FACE_DEC shows the result
//          for as long as START stays high; dropping START returns to ZERO
//
// Memories: the weight memory holds N_IN*N_HID layer-1 words, word
// j*N_IN + i = W_ij, followed by N_HID layer-2 words, word N_IN*N_HID + j =
// W_jk; there are no bias terms. A frame reads it strictly in address
// order. The image buffer holds X_i at word i. Both are written through the
// load ports only while the stage is ZERO.
//
// Timing: the MAC takes one term per adder latency (5 clocks), so a frame
// lasts 5*(N_IN*N_HID + N_HID) + 10*N_HID + 17 clocks, counted from the edge
// that samples START to the edge that raises DONE, both included; with the
// defaults that is 604,517 clocks (7.5 ms at 80 MHz).
//
// The network shape, the sharing of the MAC between layers, the stage list,
// the START/DONE/FACE_DEC pins and the sign-bit decision follow the thesis.
// The load ports, the memory layout, the handshakes and the stage timing are
// this design's choices.
module nn_face_detector
  import nn_pkg::*;
#(
  parameter int unsigned EXP_W  = FPU_EXP_W,
  parameter int unsigned FRAC_W = FPU_FRAC_W,
  parameter int unsigned N_IN   = NN_N_IN,
  parameter int unsigned N_HID  = NN_N_HID,
  parameter int unsigned W      = EXP_W + FRAC_W + 1,
  parameter int unsigned WDEPTH = N_IN * N_HID + N_HID,
  parameter int unsigned WAW    = $clog2(WDEPTH),
  parameter int unsigned IAW    = $clog2(N_IN),
  parameter int unsigned HAW    = $clog2(N_HID),
  parameter int unsigned IXW    = (IAW > HAW) ? IAW : HAW
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [W-1:0]   threshold,
  // weight load port (stage ZERO only)
  input  logic           wt_we,
  input  logic [WAW-1:0] wt_addr,
  input  logic [W-1:0]   wt_wdata,
  // image load port (stage ZERO only)
  input  logic           img_we,
  input  logic [IAW-1:0] img_addr,
  input  logic [W-1:0]   img_wdata,
  // results
  output logic           done,
  output logic           face_dec,
  output logic [W-1:0]   y_out,
  output logic [2:0]     stage
);

  typedef enum logic [1:0] {M_FEED, M_DRAIN, M_STORE} mac_sub_e;
  typedef enum logic [1:0] {A_READ, A_ISSUE, A_WAIT}  act_sub_e;

  nn_stage_e st;
  mac_sub_e  msub;
  act_sub_e  asub;

  logic [WAW-1:0] wt_ra;      // weight read address, runs through the frame
  logic [IXW-1:0] i_idx;      // input / hidden index inside a sum
  logic [HAW-1:0] j_idx;      // hidden node index
  logic           dv;         // read data for the current address is valid
  logic           face_r;
  logic           done_r;
  logic [W-1:0]   net_k, o_k;

  // ---- memories ----------------------------------------------------------
  logic [W-1:0]   wt_rdata, img_rdata, hid_rdata;
  logic           hid_we;
  logic [HAW-1:0] hid_waddr, hid_raddr;
  logic [W-1:0]   hid_wdata;

  nn_ram #(.DEPTH(WDEPTH), .WIDTH(W), .AW(WAW)) u_wmem (
    .clk(clk), .we(wt_we && (st == ST_ZERO)), .waddr(wt_addr), .wdata(wt_wdata),
    .raddr(wt_ra), .rdata(wt_rdata)
  );

  nn_ram #(.DEPTH(N_IN), .WIDTH(W), .AW(IAW)) u_img (
    .clk(clk), .we(img_we && (st == ST_ZERO)), .waddr(img_addr), .wdata(img_wdata),
    .raddr(IAW'(i_idx)), .rdata(img_rdata)
  );

  nn_ram #(.DEPTH(N_HID), .WIDTH(W), .AW(HAW)) u_hid (
    .clk(clk), .we(hid_we), .waddr(hid_waddr), .wdata(hid_wdata),
    .raddr(hid_raddr), .rdata(hid_rdata)
  );

  // ---- shared arithmetic ---------------------------------------------------
  logic         mac_clear, mac_valid, mac_ready, mac_busy;
  logic [W-1:0] mac_b, mac_acc;
  logic         act_in_v, act_out_v;
  logic [W-1:0] act_x, act_y;
  logic         dec_in_v, dec_out_v, dec_face;
  logic [W-1:0] dec_diff;

  fp_mac #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_mac (
    .clk(clk), .rst(rst), .clear(mac_clear), .in_valid(mac_valid),
    .in_ready(mac_ready), .a(wt_rdata), .b(mac_b), .acc(mac_acc), .busy(mac_busy)
  );

  fp_act #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_act (
    .clk(clk), .rst(rst), .in_valid(act_in_v), .x(act_x),
    .out_valid(act_out_v), .y(act_y)
  );

  face_decision #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_dec (
    .clk(clk), .rst(rst), .in_valid(dec_in_v), .o(o_k), .threshold(threshold),
    .out_valid(dec_out_v), .face(dec_face), .diff(dec_diff)
  );

  // ---- datapath steering ---------------------------------------------------
  logic          in_mac_stage, last_term, mac_take;

  always_comb begin
    in_mac_stage = (st == ST_ONE) || (st == ST_THREE);
    mac_b        = (st == ST_ONE) ? img_rdata : hid_rdata;
    mac_valid    = in_mac_stage && (msub == M_FEED) && dv;
    mac_take     = mac_valid && mac_ready;
    last_term    = (st == ST_ONE) ? (32'(i_idx) == N_IN - 1)
                                  : (32'(i_idx) == N_HID - 1);
    mac_clear    = in_mac_stage && (msub == M_STORE);

    hid_raddr    = (st == ST_THREE) ? HAW'(i_idx) : j_idx;
    hid_we       = ((st == ST_ONE) && (msub == M_STORE)) ||
                   ((st == ST_TWO) && (asub == A_WAIT) && act_out_v);
    hid_waddr    = j_idx;
    hid_wdata    = (st == ST_ONE) ? mac_acc : act_y;

    act_in_v     = ((st == ST_TWO) && (asub == A_ISSUE)) ||
                   ((st == ST_FOUR) && (asub == A_ISSUE));
    act_x        = (st == ST_TWO) ? hid_rdata : net_k;
    dec_in_v     = (st == ST_FIVE) && (asub == A_ISSUE);
  end

  // ---- stage controller ----------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= ST_ZERO;
      msub   <= M_FEED;
      asub   <= A_READ;
      wt_ra  <= '0;
      i_idx  <= '0;
      j_idx  <= '0;
      dv     <= 1'b0;
      face_r <= 1'b0;
      done_r <= 1'b0;
      net_k  <= '0;
      o_k    <= '0;
    end else begin
      done_r <= 1'b0;
      unique case (st)
        ST_ZERO: begin
          if (start) begin
            st    <= ST_ONE;
            msub  <= M_FEED;
            wt_ra <= '0;
            i_idx <= '0;
            j_idx <= '0;
            dv    <= 1'b0;
          end
        end

        ST_ONE, ST_THREE: begin
          unique case (msub)
            M_FEED: begin
              if (mac_take) begin
                dv    <= 1'b0;
                wt_ra <= wt_ra + 1'b1;
                if (last_term) msub <= M_DRAIN;
                else           i_idx <= i_idx + 1'b1;
              end else begin
                dv <= 1'b1;
              end
            end
            M_DRAIN: if (!mac_busy) msub <= M_STORE;
            default: begin   // M_STORE: result leaves, accumulator cleared
              msub  <= M_FEED;
              i_idx <= '0;
              dv    <= 1'b0;
              if (st == ST_THREE) begin
                net_k <= mac_acc;
                st    <= ST_FOUR;
                asub  <= A_ISSUE;
              end else if (32'(j_idx) == N_HID - 1) begin
                st    <= ST_TWO;
                j_idx <= '0;
                asub  <= A_READ;
              end else begin
                j_idx <= j_idx + 1'b1;
              end
            end
          endcase
        end

        ST_TWO: begin
          unique case (asub)
            A_READ:  asub <= A_ISSUE;   // hidden buffer read latency
            A_ISSUE: asub <= A_WAIT;
            default: begin              // A_WAIT
              if (act_out_v) begin
                if (32'(j_idx) == N_HID - 1) begin
                  st    <= ST_THREE;
                  msub  <= M_FEED;
                  i_idx <= '0;
                  dv    <= 1'b0;
                end else begin
                  j_idx <= j_idx + 1'b1;
                  asub  <= A_READ;
                end
              end
            end
          endcase
        end

        ST_FOUR: begin
          if (asub == A_ISSUE) asub <= A_WAIT;
          else if (act_out_v) begin
            o_k  <= act_y;
            st   <= ST_FIVE;
            asub <= A_ISSUE;
          end
        end

        ST_FIVE: begin
          if (asub == A_ISSUE) asub <= A_WAIT;
          else if (dec_out_v) begin
            face_r <= dec_face;
            st     <= ST_SIX;
            done_r <= 1'b1;
          end
        end

        ST_SIX: begin
          if (!start) st <= ST_ZERO;
        end

        default: st <= ST_ZERO;
      endcase
    end
  end

  assign done     = done_r;
  assign face_dec = (st == ST_SIX) && face_r;
  assign y_out    = o_k;
  assign stage    = st;

endmodule
