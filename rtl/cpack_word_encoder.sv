// cpack_word_encoder: codes one 32-bit word with the C-Pack code table.
//
// Purely combinational. The word is first checked against the two static
// patterns, zzzz (all zero) and zzzx (only the low byte non-zero). If
// neither holds, it is compared with every valid dictionary entry: a full
// match (mmmm), a match of the upper three bytes (mmmx) or of the upper two
// bytes (mmxx). The cheapest code wins: mmmm before mmmx before mmxx, and
// among entries of equal quality the lowest index. A word with no match at
// all is sent whole (xxxx). The output combines code, dictionary index and
// unmatched bytes, as listed in cpack_pkg.
//
// Interface:
//   word                 the word to code
//   dict/dict_valid      dictionary contents the word is compared against
//   pattern              which pattern was chosen
//   cw                   compressed word, right-aligned, code in the top
//                        bits of its len bits; bits above len are zero
//   len                  length of cw in bits (2 to 34)
//   push                 the word failed both static patterns and goes into
//                        the dictionary
//
// The order "static patterns first, then the dictionary" and the codes are
// the document's. The tie-break among entries is this design's choice.
module cpack_word_encoder #(
  parameter int unsigned ENTRIES = 16,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic [cpack_pkg::WORD_W-1:0] word,
  input  logic [cpack_pkg::WORD_W-1:0] dict [ENTRIES],
  input  logic [ENTRIES-1:0]           dict_valid,
  output cpack_pkg::pattern_e          pattern,
  output logic [cpack_pkg::CW_W-1:0]   cw,
  output logic [cpack_pkg::LEN_W-1:0]  len,
  output logic [IDX_W-1:0]             idx,
  output logic                         push
);
  import cpack_pkg::*;

  logic is_zzzz, is_zzzx;
  logic [ENTRIES-1:0] m4, m3, m2;

  assign is_zzzz = (word == '0);
  assign is_zzzx = (word[31:8] == '0) && (word[7:0] != '0);

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      m4[i] = dict_valid[i] && (dict[i]        == word);
      m3[i] = dict_valid[i] && (dict[i][31:8]  == word[31:8]);
      m2[i] = dict_valid[i] && (dict[i][31:16] == word[31:16]);
    end
  end

  // lowest set bit of each match vector
  function automatic logic [IDX_W-1:0] first_set(logic [ENTRIES-1:0] v);
    logic [IDX_W-1:0] r;
    r = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (v[i]) r = IDX_W'(i);
    return r;
  endfunction

  always_comb begin
    idx = '0;
    if (is_zzzz)         pattern = PAT_ZZZZ;
    else if (is_zzzx)    pattern = PAT_ZZZX;
    else if (|m4) begin  pattern = PAT_MMMM; idx = first_set(m4); end
    else if (|m3) begin  pattern = PAT_MMMX; idx = first_set(m3); end
    else if (|m2) begin  pattern = PAT_MMXX; idx = first_set(m2); end
    else                 pattern = PAT_XXXX;
  end

  assign push = !(is_zzzz || is_zzzx);
  assign len  = code_length(pattern, IDX_W);

  always_comb begin
    cw = '0;
    case (pattern)
      PAT_ZZZZ: cw = CW_W'(CODE_ZZZZ);
      PAT_XXXX: cw = CW_W'({CODE_XXXX, word});
      PAT_MMMM: cw = CW_W'({CODE_MMMM, idx});
      PAT_MMXX: cw = CW_W'({CODE_MMXX, idx, word[15:0]});
      PAT_ZZZX: cw = CW_W'({CODE_ZZZX, word[7:0]});
      PAT_MMMX: cw = CW_W'({CODE_MMMX, idx, word[7:0]});
      default:  cw = '0;
    endcase
  end

endmodule
