// cpack_compressor: C-Pack cache-line compressor, two words per cycle.
//
// A cache line of LINE_WORDS 32-bit words arrives as LINE_WORDS/2 beats of
// two words (in_data[31:0] is the first word of the pair, in_data[63:32]
// the second). Each word goes through its own cpack_word_encoder: word 1
// is compared against the dictionary as it stood at the start of the
// cycle, word 2 against the dictionary including word 1 of the same
// cycle, so the pair is coded exactly as two sequential words would be.
// Every word that fails the static patterns is pushed into the dictionary.
//
// The variable-length codes are packed, in word order and first bit first,
// into a shift accumulator: each beat shifts it left by len1+len2 and ORs
// in the two codes. After the last beat of a line the packed stream is
// presented left-aligned (first bit in the MSB of out_line) together with
// its length in bits, and the dictionary is emptied for the next line.
//
// Interface and timing:
//   in_valid/in_data     one pair of words per cycle; no back-pressure,
//                        a beat is taken whenever in_valid is high
//   cw_valid, cw1/len1,  the two compressed words of the previous beat, one
//   cw2/len2, pat1/pat2  cycle after it (cw right-aligned, see cpack_pkg)
//   out_valid            one-cycle pulse, the cycle after the last beat
//   out_line/out_bits    the compressed line and its length in bits;
//                        held until the next line completes
//   A line of LINE_WORDS words thus takes LINE_WORDS/2 cycles and its
//   result appears one cycle after the last beat. Reset is asynchronous,
//   active low.
//
// Two words per cycle, the encoder order and the code table are the
// document's. The line length (16 words = 64 bytes), the packing into one
// left-aligned stream, the register stage and the absence of a stall
// signal are this design's choices.
module cpack_compressor #(
  parameter int unsigned ENTRIES    = 16,
  parameter int unsigned LINE_WORDS = 16,
  localparam int unsigned IDX_W     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned MAXBITS   = LINE_WORDS * cpack_pkg::CW_W,
  localparam int unsigned BITS_W    = $clog2(MAXBITS + 1),
  localparam int unsigned BEATS     = LINE_WORDS / 2,
  localparam int unsigned BEAT_W    = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [2*cpack_pkg::WORD_W-1:0] in_data,
  output logic                         cw_valid,
  output logic [cpack_pkg::CW_W-1:0]   cw1,
  output logic [cpack_pkg::LEN_W-1:0]  len1,
  output cpack_pkg::pattern_e          pat1,
  output logic [cpack_pkg::CW_W-1:0]   cw2,
  output logic [cpack_pkg::LEN_W-1:0]  len2,
  output cpack_pkg::pattern_e          pat2,
  output logic                         out_valid,
  output logic [MAXBITS-1:0]           out_line,
  output logic [BITS_W-1:0]            out_bits
);
  import cpack_pkg::*;

  // a line is a whole number of two-word beats
  if (LINE_WORDS < 2 || LINE_WORDS % 2 != 0) begin : g_line_words_check
    $error("LINE_WORDS must be even and at least 2");
  end

  logic [WORD_W-1:0] w1, w2;
  assign w1 = in_data[WORD_W-1:0];
  assign w2 = in_data[2*WORD_W-1:WORD_W];

  logic [WORD_W-1:0]  dict     [ENTRIES];
  logic [WORD_W-1:0]  dict_fwd [ENTRIES];
  logic [ENTRIES-1:0] dvalid, dvalid_fwd;

  logic [BEAT_W-1:0] beat;
  logic              last_beat;
  assign last_beat = in_valid && (beat == BEAT_W'(BEATS - 1));

  pattern_e          p1, p2;
  logic [CW_W-1:0]   c1, c2;
  logic [LEN_W-1:0]  l1, l2;
  logic              push1, push2;

  cpack_word_encoder #(.ENTRIES(ENTRIES)) u_enc1 (
    .word(w1), .dict(dict), .dict_valid(dvalid),
    .pattern(p1), .cw(c1), .len(l1), .idx(), .push(push1)
  );

  cpack_word_encoder #(.ENTRIES(ENTRIES)) u_enc2 (
    .word(w2), .dict(dict_fwd), .dict_valid(dvalid_fwd),
    .pattern(p2), .cw(c2), .len(l2), .idx(), .push(push2)
  );

  cpack_dictionary #(.ENTRIES(ENTRIES)) u_dict (
    .clk, .rst_n,
    .clear(last_beat),
    .push1(in_valid && push1), .data1(w1),
    .push2(in_valid && push2), .data2(w2),
    .entries(dict), .valid(dvalid),
    .fwd_entries(dict_fwd), .fwd_valid(dvalid_fwd),
    .wr_ptr()
  );

  // packing accumulator: the stream so far, right-aligned
  logic [MAXBITS-1:0] acc, acc_next;
  logic [BITS_W-1:0]  nbits, nbits_next;

  // shift of one beat: up to 2 * CW_W bits, one bit wider than a length
  logic [LEN_W:0] beat_len;
  assign beat_len = (LEN_W + 1)'(l1) + (LEN_W + 1)'(l2);

  always_comb begin
    acc_next   = (acc << beat_len) | (MAXBITS'(c1) << l2) | MAXBITS'(c2);
    nbits_next = nbits + BITS_W'(l1) + BITS_W'(l2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat      <= '0;
      acc       <= '0;
      nbits     <= '0;
      out_valid <= 1'b0;
      out_line  <= '0;
      out_bits  <= '0;
      cw_valid  <= 1'b0;
      cw1       <= '0;
      cw2       <= '0;
      len1      <= '0;
      len2      <= '0;
      pat1      <= PAT_ZZZZ;
      pat2      <= PAT_ZZZZ;
    end else begin
      out_valid <= 1'b0;
      cw_valid  <= in_valid;
      if (in_valid) begin
        cw1  <= c1;
        cw2  <= c2;
        len1 <= l1;
        len2 <= l2;
        pat1 <= p1;
        pat2 <= p2;
        if (last_beat) begin
          beat      <= '0;
          acc       <= '0;
          nbits     <= '0;
          out_valid <= 1'b1;
          out_line  <= acc_next << (BITS_W'(MAXBITS) - nbits_next);
          out_bits  <= nbits_next;
        end else begin
          beat  <= beat + 1'b1;
          acc   <= acc_next;
          nbits <= nbits_next;
        end
      end
    end
  end

  // the line result follows a beat, never an idle cycle
  a_out_after_beat: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> cw_valid);

endmodule
