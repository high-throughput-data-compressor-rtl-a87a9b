// lz77_pkg: constants and types shared by the LZ77 CAM compressor.
//
// The compressor replaces a repeated stream of symbols by a codeword that
// holds the stream's start address in the sliding window and its length, and
// sends any symbol that does not start a stream of two or more symbols as a
// literal. Every codeword carries a one-bit ID: 0 for a (start, length) pair,
// 1 for a literal. The default window of 2048 byte symbols and maximum match
// length of 32 are the main configuration; the 11-bit start address and 5-bit
// length field then make up the 16-bit codeword body. Carrying the ID as a
// separate 17th bit is this design's choice.
package lz77_pkg;

  // Default configuration.
  parameter int unsigned WINDOW_DEFAULT  = 2048;  // S_w, window (CAM) size in symbols
  parameter int unsigned MAX_LEN_DEFAULT = 32;    // L_m, maximum match length
  parameter int unsigned ROW_W_DEFAULT   = 32;    // CAM row width of the 64 x 32 partition
  parameter int unsigned SYM_W_DEFAULT   = 8;     // symbol width (byte cells)

  // Codeword ID bit.
  typedef enum logic {
    ID_MATCH   = 1'b0,   // body = {start address, match length - 1}
    ID_LITERAL = 1'b1    // body = source symbol, zero-extended
  } cw_id_e;

endpackage
