// lbph_pkg: sizes and shared types of the LBP-histogram emotion recogniser.
//
// The design works on 48x48 grey images with 8-bit pixels (the image size is a
// parameter of the modules that scan it) and compares a test image with seven trained
// images, one per emotion. The improved-KNN error identifier treats each LBP
// image as one 18432-bit word (2304 pixels x 8 bits) and reports a bit
// position with 15 bits. Counter and distance widths are this design's own
// choices, sized for the worst case.
package lbph_pkg;

  localparam int N_CLASS  = 7;                  // trained images (emotions)
  localparam int BINS     = 256;                // histogram bins, codes 8'h00..8'hFF
  localparam int CNT_W    = 12;                 // bin counter, holds 2304
  localparam int DIST_W   = 32;                 // squared Euclidean distance
  localparam int POS_W    = 15;                 // error bit position, 2^15 > 18432
  localparam int CLASS_W  = 3;                  // class index, 0..6

  // Emotion classes, in the order the decision outputs are numbered.
  typedef enum logic [CLASS_W-1:0] {
    ANGER    = 3'd0,
    CONTEMPT = 3'd1,
    DISGUST  = 3'd2,
    FEAR     = 3'd3,
    HAPPY    = 3'd4,
    SAD      = 3'd5,
    SURPRISE = 3'd6
  } emotion_e;

  // Operation requested from the sequencer.
  typedef enum logic {
    OP_TRAIN = 1'b0,   // LBP of the loaded image becomes trained class k
    OP_TEST  = 1'b1    // LBP, distance, decision and error identification
  } op_e;

endpackage
