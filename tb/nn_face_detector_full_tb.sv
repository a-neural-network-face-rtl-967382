// nn_face_detector_full_tb: end-to-end test of the face detector with every
// parameter at its default: 400 inputs (a 20x20 window), 300 hidden nodes,
// 120,300 weights, 16-bit number format.
//
// Same checks as nn_face_detector_tb (bit-exact hidden nodes, output, DONE,
// FACE_DEC, frame length, and that every stage, MAC stall, bypass, face and
// non-face result occurs), over two frames: one whose threshold lies just
// below the expected output (face) and one just above it (non-face).
module nn_face_detector_full_tb;
  import fp_ref_pkg::*;
  import nn_pkg::*;

  localparam int N_IN   = NN_N_IN;
  localparam int N_HID  = NN_N_HID;
  localparam int FRAMES = 2;

  `include "nn_face_detector_tb_body.svh"

endmodule
