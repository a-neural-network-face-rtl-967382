// nn_pkg: constants and types shared by the face-detector network.
//
// The default number format is the 16-bit reduced floating-point format
// (FPU16): 1 sign bit, 6 exponent bits with bias 31, 9 fraction bits and a
// hidden leading one. The network is a two-layer perceptron with 400 inputs
// (a 20x20 grey-scale window), 300 hidden nodes and one output node. These
// numbers are the design's defaults; every module also takes them as
// parameters so that narrower or wider formats (FPU12 ... FPU32) and smaller
// networks can be built from the same RTL.
//
// nn_stage_e numbers the steps of one detection ("frame"):
//   ZERO  idle, waiting for START
//   ONE   layer-1 multiply-accumulate, net_j = sum_i W_ij * X_i
//   TWO   layer-1 activation, O_j = 0.75 * net_j
//   THREE layer-2 multiply-accumulate, net_k = sum_j W_jk * O_j
//   FOUR  layer-2 activation, O_k = 0.75 * net_k
//   FIVE  decision, sign of O_k - threshold
//   SIX   result out (DONE pulse, FACE_DEC valid)
package nn_pkg;

  localparam int unsigned FPU_EXP_W  = 6;    // exponent bits of FPU16..FPU12
  localparam int unsigned FPU_FRAC_W = 9;    // fraction bits of FPU16
  localparam int unsigned NN_N_IN    = 400;  // input nodes (20 x 20 pixels)
  localparam int unsigned NN_N_HID   = 300;  // hidden nodes


  typedef enum logic [2:0] {
    ST_ZERO  = 3'd0,
    ST_ONE   = 3'd1,
    ST_TWO   = 3'd2,
    ST_THREE = 3'd3,
    ST_FOUR  = 3'd4,
    ST_FIVE  = 3'd5,
    ST_SIX   = 3'd6
  } nn_stage_e;

endpackage
