// nn_face_detector_tb: end-to-end test of the face detector at reduced size
// (16 inputs, 8 hidden nodes, default 16-bit number format).
//
// Random weights and images are generated and loaded through the load
// ports. For every frame the testbench computes the expected hidden-node
// values, the network output O_k and the face/non-face decision with the
// bit-exact reference arithmetic of fp_ref_pkg (sequential sums in input
// order, truncation rounding, f(x) = 0.75 x), then runs the frame and checks
// the hidden buffer, y_out, DONE, FACE_DEC and the frame length in clocks.
// Thresholds are set just below, at and just above the expected output so
// that both decisions occur. It counts how often each stage is entered, the
// MAC stalls (operands waiting for the adder), the adder-output bypass, and
// face and non-face results, and fails if any of them never happens.
module nn_face_detector_tb;
  import fp_ref_pkg::*;
  import nn_pkg::*;

  localparam int N_IN   = 16;
  localparam int N_HID  = 8;
  localparam int FRAMES = 9;

  `include "nn_face_detector_tb_body.svh"

endmodule
