// gbc_pkg: shared constants and types of the dictionary / bitmask / Golomb
// bitstream codec.
//
// The defaults are the sizes of the worked examples: 8-bit symbols, a
// two-entry dictionary (one index bit), 2-bit bitmasks at four fixed
// positions, and Golomb group size m = 4 (two tail bits).  WIN_W, the widest
// code handled in one cycle, and BUF_W, the input buffer size, are this
// design's choice; BUF_W = 32 lies in the 32..64-bit range usual for such
// buffers.
package gbc_pkg;

  localparam int unsigned SYM_W    = 8;   // symbol width (multiple of 8)
  localparam int unsigned DICT_D   = 2;   // dictionary entries, a power of two
  localparam int unsigned MASK_W   = 2;   // bitmask pattern width
  localparam int unsigned GOLOMB_M = 4;   // Golomb group size, a power of two
  localparam int unsigned WIN_W    = 16;  // widest code seen in one cycle
  localparam int unsigned BUF_W    = 32;  // decompressor input buffer, bits
  localparam int unsigned RUN_W    = 16;  // Golomb run-length counter width

  // Coding scheme used for a whole bitstream.
  typedef enum logic [1:0] {
    MODE_DICT    = 2'd0,   // flag + index, or flag + raw word
    MODE_BITMASK = 2'd1,   // dictionary, single-bitmask or raw word
    MODE_GOLOMB  = 2'd2    // Golomb run-length code of a bit string
  } mode_e;

endpackage
