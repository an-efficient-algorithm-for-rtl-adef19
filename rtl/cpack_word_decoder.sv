// cpack_word_decoder: rebuilds one 32-bit word from its C-Pack code.
//
// Purely combinational. The input is a window of the compressed stream
// that starts at the word's first bit (left-aligned, MSB = first bit).
// The first two bits are read; if they are 11, two more bits are read,
// giving a 2-bit or 4-bit code. A static-pattern code (zzzz, zzzx) yields
// zeros plus the unmatched low byte; a dictionary code takes the upper
// bytes from the indexed entry and the rest from the stream; xxxx takes
// the whole word from the stream.
//
// Interface:
//   win                  the next CW_W bits of the stream, first bit in the MSB
//   dict                 dictionary contents at this word
//   word                 the rebuilt word
//   pattern              decoded pattern
//   len                  number of stream bits this word used
//   push                 the word goes into the dictionary (all codes but
//                        zzzz and zzzx), mirroring the compressor
//   bad_code             the unused code 1111 was read
//
// Codes and payload layout follow the document's code table (see
// cpack_pkg). Flagging code 1111 is this design's addition.
module cpack_word_decoder #(
  parameter int unsigned ENTRIES = 16,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic [cpack_pkg::CW_W-1:0]   win,
  input  logic [cpack_pkg::WORD_W-1:0] dict [ENTRIES],
  output logic [cpack_pkg::WORD_W-1:0] word,
  output cpack_pkg::pattern_e          pattern,
  output logic [cpack_pkg::LEN_W-1:0]  len,
  output logic                         push,
  output logic                         bad_code
);
  import cpack_pkg::*;

  // fields after a 2-bit and after a 4-bit code
  logic [IDX_W-1:0]  idx2, idx4;
  logic [WORD_W-1:0] entry2, entry4;

  assign idx2   = win[CW_W-3 -: IDX_W];
  assign idx4   = win[CW_W-5 -: IDX_W];
  assign entry2 = dict[idx2];
  assign entry4 = dict[idx4];

  always_comb begin
    bad_code = 1'b0;
    word     = '0;
    pattern  = PAT_ZZZZ;
    case (win[CW_W-1 -: 2])
      CODE_ZZZZ: begin
        pattern = PAT_ZZZZ;
        word    = '0;
      end
      CODE_XXXX: begin
        pattern = PAT_XXXX;
        word    = win[CW_W-3 -: 32];
      end
      CODE_MMMM: begin
        pattern = PAT_MMMM;
        word    = entry2;
      end
      default: begin
        case (win[CW_W-1 -: 4])
          CODE_MMXX: begin
            pattern = PAT_MMXX;
            word    = {entry4[31:16], win[CW_W-5-IDX_W -: 16]};
          end
          CODE_ZZZX: begin
            pattern = PAT_ZZZX;
            word    = {24'd0, win[CW_W-5 -: 8]};
          end
          CODE_MMMX: begin
            pattern = PAT_MMMX;
            word    = {entry4[31:8], win[CW_W-5-IDX_W -: 8]};
          end
          default: begin
            pattern  = PAT_ZZZZ;
            bad_code = 1'b1;
          end
        endcase
      end
    endcase
  end

  assign len  = bad_code ? LEN_W'(4) : code_length(pattern, IDX_W);
  assign push = !(pattern == PAT_ZZZZ || pattern == PAT_ZZZX);

endmodule
