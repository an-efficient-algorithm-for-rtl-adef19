// cpack_decompressor: C-Pack cache-line decompressor, two words per cycle.
//
// Takes one compressed line (a left-aligned bit stream, as produced by
// cpack_compressor) and rebuilds its LINE_WORDS words, two per cycle. Each
// cycle the stream is shifted left by the read position to give word 1's
// window; word 1 is decoded by a cpack_word_decoder, which also returns its
// length, and word 2's window starts that many bits further on. Word 2 is
// decoded against the dictionary including word 1 of the same cycle, just
// as the compressor coded it, and both words are pushed into the
// dictionary unless they were static-pattern words.
//
// Interface and timing:
//   in_valid/in_ready    a line is taken when both are high; in_ready is low
//                        while a line is being decoded
//   in_line/in_bits      compressed stream (first bit in the MSB) and its
//                        length in bits
//   out_valid/out_data   one pair of words per cycle, out_data[31:0] first;
//                        the first pair appears two cycles after the line
//                        is taken, the rest on consecutive cycles
//   out_last             marks the last pair of the line
//   error                with out_last: the line held code 1111 or did not
//                        use exactly in_bits bits
//   A line of LINE_WORDS words occupies the unit for LINE_WORDS/2 cycles
//   after the cycle it is taken. Reset is asynchronous, active low.
//
// The code reading (2-bit, then 4-bit code) and the rebuilding from zeros,
// stream bytes and dictionary bytes are the document's. The stream format,
// the register stage and the error check are this design's choices.
module cpack_decompressor #(
  parameter int unsigned ENTRIES    = 16,
  parameter int unsigned LINE_WORDS = 16,
  localparam int unsigned MAXBITS   = LINE_WORDS * cpack_pkg::CW_W,
  localparam int unsigned BITS_W    = $clog2(MAXBITS + 1),
  localparam int unsigned BEATS     = LINE_WORDS / 2,
  localparam int unsigned BEAT_W    = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [MAXBITS-1:0]             in_line,
  input  logic [BITS_W-1:0]              in_bits,
  output logic                           out_valid,
  output logic [2*cpack_pkg::WORD_W-1:0] out_data,
  output logic                           out_last,
  output logic                           error
);
  import cpack_pkg::*;

  // a line is a whole number of two-word beats
  if (LINE_WORDS < 2 || LINE_WORDS % 2 != 0) begin : g_line_words_check
    $error("LINE_WORDS must be even and at least 2");
  end

  logic [MAXBITS-1:0] line;
  logic [BITS_W-1:0]  total;
  logic [BITS_W-1:0]  pos;
  logic [BEAT_W-1:0]  beat;
  logic               busy;
  logic               bad_seen;

  assign in_ready = !busy;

  logic [WORD_W-1:0]  dict     [ENTRIES];
  logic [WORD_W-1:0]  dict_fwd [ENTRIES];

  logic [CW_W-1:0]   win1, win2;
  logic [WORD_W-1:0] w1, w2;
  logic [LEN_W-1:0]  l1, l2;
  logic              push1, push2, bad1, bad2;
  logic [BITS_W-1:0] pos2, pos_next;
  logic [MAXBITS-1:0] sh1, sh2;

  always_comb begin
    sh1      = line << pos;
    win1     = sh1[MAXBITS-1 -: CW_W];
    pos2     = pos + BITS_W'(l1);
    sh2      = line << pos2;
    win2     = sh2[MAXBITS-1 -: CW_W];
    pos_next = pos2 + BITS_W'(l2);
  end

  cpack_word_decoder #(.ENTRIES(ENTRIES)) u_dec1 (
    .win(win1), .dict(dict), .word(w1), .pattern(),
    .len(l1), .push(push1), .bad_code(bad1)
  );

  cpack_word_decoder #(.ENTRIES(ENTRIES)) u_dec2 (
    .win(win2), .dict(dict_fwd), .word(w2), .pattern(),
    .len(l2), .push(push2), .bad_code(bad2)
  );

  logic take;
  assign take = in_valid && !busy;

  cpack_dictionary #(.ENTRIES(ENTRIES)) u_dict (
    .clk, .rst_n,
    .clear(take),
    .push1(busy && push1), .data1(w1),
    .push2(busy && push2), .data2(w2),
    .entries(dict), .valid(),
    .fwd_entries(dict_fwd), .fwd_valid(),
    .wr_ptr()
  );

  logic step_last;
  assign step_last = busy && (beat == BEAT_W'(BEATS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line      <= '0;
      total     <= '0;
      pos       <= '0;
      beat      <= '0;
      busy      <= 1'b0;
      bad_seen  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      error     <= 1'b0;
    end else begin
      out_valid <= busy;
      out_last  <= step_last;
      error     <= 1'b0;
      if (take) begin
        line     <= in_line;
        total    <= in_bits;
        pos      <= '0;
        beat     <= '0;
        busy     <= 1'b1;
        bad_seen <= 1'b0;
      end else if (busy) begin
        out_data <= {w2, w1};
        pos      <= pos_next;
        beat     <= beat + 1'b1;
        bad_seen <= bad_seen || bad1 || bad2;
        if (step_last) begin
          busy  <= 1'b0;
          error <= bad_seen || bad1 || bad2 || (pos_next != total);
        end
      end
    end
  end

  // handshake rules: a pair marked last is a valid pair, a line is never
  // taken while one is being decoded, and the error flag only comes with
  // the last pair
  a_last_valid: assert property (@(posedge clk) disable iff (!rst_n) out_last |-> out_valid);
  a_no_take_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !take);
  a_error_last: assert property (@(posedge clk) disable iff (!rst_n) error |-> out_last);

endmodule
