// cpack_pkg: constants and types shared by the C-Pack compressor and
// decompressor.
//
// C-Pack codes each 32-bit word of a cache line with a short prefix code.
// Two patterns are static (an all-zero word, and a word whose three upper
// bytes are zero); the others refer to an entry of a small dictionary of
// recently seen words, matched in full, in its upper three bytes or in its
// upper two bytes. A word that fits none of these is sent whole.
//
//   pattern  code  payload               length (bits)
//   zzzz     00    -                     2
//   xxxx     01    word (32)             34
//   mmmm     10    index                 2 + IDX_W
//   mmxx     1100  index, low 2 bytes    4 + IDX_W + 16
//   zzzx     1101  low byte              12
//   mmmx     1110  index, low byte       4 + IDX_W + 8
//
// Pattern letters are written most significant byte first: z is a zero
// byte, m a byte equal to the dictionary entry, x an unmatched byte.
// Code 1111 is unused. The codes and the lengths at IDX_W = 4 are the
// ones of the document's code table. Everything in a compressed word is
// sent most significant bit first, code first.
package cpack_pkg;

  localparam int unsigned WORD_W = 32;
  // widest compressed word: 2-bit code and an unmatched 32-bit word
  localparam int unsigned CW_W   = 34;
  // enough bits to hold any compressed-word length (0..34)
  localparam int unsigned LEN_W  = 6;

  typedef enum logic [2:0] {
    PAT_ZZZZ = 3'd0,
    PAT_XXXX = 3'd1,
    PAT_MMMM = 3'd2,
    PAT_MMXX = 3'd3,
    PAT_ZZZX = 3'd4,
    PAT_MMMX = 3'd5
  } pattern_e;

  localparam logic [1:0] CODE_ZZZZ = 2'b00;
  localparam logic [1:0] CODE_XXXX = 2'b01;
  localparam logic [1:0] CODE_MMMM = 2'b10;
  localparam logic [3:0] CODE_MMXX = 4'b1100;
  localparam logic [3:0] CODE_ZZZX = 4'b1101;
  localparam logic [3:0] CODE_MMMX = 4'b1110;

  // Length in bits of a compressed word of pattern p, for an index of
  // idx_w bits.
  function automatic logic [LEN_W-1:0] code_length(pattern_e p, int unsigned idx_w);
    case (p)
      PAT_ZZZZ: return LEN_W'(2);
      PAT_XXXX: return LEN_W'(34);
      PAT_MMMM: return LEN_W'(2 + idx_w);
      PAT_MMXX: return LEN_W'(4 + idx_w + 16);
      PAT_ZZZX: return LEN_W'(12);
      PAT_MMMX: return LEN_W'(4 + idx_w + 8);
      default:  return LEN_W'(0);
    endcase
  endfunction

endpackage
