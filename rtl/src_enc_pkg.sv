// src_enc_pkg: sizes and types shared by the reconfigurable source encoder.
//
// The encoder works on a message window of MAX_LEN characters (15 here, the
// size of the input memory element). Each character is SYM_W bits wide.
// With at most MAX_LEN distinct symbols a Huffman code word can be at most
// MAX_LEN-1 bits long, so code words are carried in CODE_W = MAX_LEN-1 bits;
// Shannon code words are never longer than that either. Counts, cumulative
// counts and tree weights never exceed MAX_LEN and fit in CNT_W bits.
package src_enc_pkg;

  parameter int unsigned MAX_LEN = 15;   // characters held by a memory element
  parameter int unsigned SYM_W   = 8;    // bits per character (text input)
  parameter int unsigned CNT_W   = $clog2(MAX_LEN + 1);
  parameter int unsigned CODE_W  = MAX_LEN - 1;

  // Which lanes the controller connects for a run.
  typedef enum logic [1:0] {
    MODE_NONE    = 2'b00,
    MODE_HUFFMAN = 2'b01,
    MODE_SHANNON = 2'b10,
    MODE_BOTH    = 2'b11
  } enc_mode_e;

  // Controller phases.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_LOAD   = 3'd1,
    PH_COUNT  = 3'd2,
    PH_BUILD  = 3'd3,
    PH_CODE   = 3'd4,
    PH_DONE   = 3'd5
  } ctrl_phase_e;

endpackage
