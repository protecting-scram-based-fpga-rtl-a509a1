// ind_pkg: shared constants and types of the interleaved-parity (InD) frame scrubber.
//
// A configuration frame is viewed as a grid of FRAME_WORDS rows (one row per 32-bit
// frame word) and WORD_W columns (bit position inside the word). The default frame
// geometry (81 words of 32 bits) and the device size (28464 frames) are those of a
// Virtex-6 XC6VLX240T. The interleaving distances V, H and D are the ones of the worked
// I2D/I3D example (vertical 4, horizontal 3, diagonal 5). The cluster size of the erasure
// code is this design's own choice: 48 frames, which divides 28464 into 593 clusters.
package ind_pkg;

  localparam int unsigned FRAME_WORDS    = 81;     // words per configuration frame
  localparam int unsigned WORD_W         = 32;     // bits per frame word
  localparam int unsigned NUM_FRAMES     = 28464;  // configuration frames in the device
  localparam int unsigned DIST_V         = 4;      // vertical interleaving distance
  localparam int unsigned DIST_H         = 3;      // horizontal interleaving distance
  localparam int unsigned DIST_D         = 5;      // diagonal interleaving distance
  localparam int unsigned CLUSTER_FRAMES = 48;     // frames sharing one erasure block

  // Parity vector layout: [V-1:0] vertical, [V+H-1:V] horizontal, [V+H+D-1:V+H] diagonal.
  function automatic int unsigned parity_width(int unsigned v, int unsigned h,
                                               int unsigned d, bit use_diag);
    return v + h + (use_diag ? d : 0);
  endfunction

  // Scrubber controller states.
  typedef enum logic [3:0] {
    S_IDLE,       // waiting for an encode request or for scrubbing to be enabled
    S_ENC_READ,   // encode: stream one frame, accumulate parity and erasure block
    S_ENC_PAR,    // encode: store the frame's parity bits
    S_ENC_RED,    // encode: store the cluster's erasure block
    S_SCR_READ,   // scrub: stream one frame through the parity generator
    S_SCR_CHECK,  // scrub: compare generated and stored parity
    S_REC_RED,    // recover: load the cluster's erasure block into the buffer
    S_REC_READ,   // recover: XOR one surviving frame of the cluster into the buffer
    S_REC_VERIFY, // recover: stream the rebuilt frame through the parity generator
    S_REC_CHECK,  // recover: compare the rebuilt frame's parity with the stored one
    S_REC_WRITE   // recover: write the rebuilt frame back
  } scrub_state_e;

endpackage
