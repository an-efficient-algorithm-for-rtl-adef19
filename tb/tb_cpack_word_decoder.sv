// tb_cpack_word_decoder: checks the word decoder. The worked examples
// (1101)AB -> 000000AB and, with the four-entry dictionary whose entry 0
// is 12345678, (1110)(00)AA -> 123456AA come first. Then random words are
// coded by the reference model, placed at the head of a window followed
// by random stream bits, and must decode to the same word, length and
// dictionary push. The unused code 1111 must raise bad_code.
module tb_cpack_word_decoder;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [CW_W-1:0]  win4, win;
  logic [31:0]      d4 [4];
  logic [31:0]      d  [16];
  logic [31:0]      word4, word;
  pattern_e         p4, p;
  logic [LEN_W-1:0] len4, len;
  logic             push4, push, bad4, bad;

  cpack_word_decoder #(.ENTRIES(4)) dut4 (
    .win(win4), .dict(d4), .word(word4), .pattern(p4),
    .len(len4), .push(push4), .bad_code(bad4)
  );

  cpack_word_decoder dut (
    .win(win), .dict(d), .word(word), .pattern(p),
    .len(len), .push(push), .bad_code(bad)
  );

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_dict_t rd;
    bit        bits[$];
    int        pat;
    word_gen   gen = new();
    logic [CW_W-1:0] noise;
    bit [31:0] w;

    d4 = '{32'h12345678, 32'hAAAAAAAA, 32'h12340000, 32'h3527894E};
    win4 = {4'b1101, 8'hAB, 22'h3FFFFF}; #1;
    check("(1101)AB word", word4, 32'h000000AB);
    check("(1101)AB len",  len4,  12);
    check("(1101)AB push", push4, 0);
    win4 = {4'b1110, 2'b00, 8'hAA, 20'h0}; #1;
    check("(111000)AA word", word4, 32'h123456AA);
    check("(111000)AA len",  len4,  14);
    check("(111000)AA push", push4, 1);
    win4 = {2'b10, 2'b01, 30'h0}; #1;
    check("(10)01 word", word4, 32'hAAAAAAAA);
    win4 = {4'b1111, 30'h0}; #1;
    check("1111 bad", bad4, 1);

    for (int t = 0; t < 4000; t++) begin
      dict_init(rd, 16);
      for (int i = 0; i < 16; i++) begin
        if ($urandom_range(0, 3) != 0) begin
          rd.data[i]  = gen.next();
          rd.valid[i] = 1;
        end
        d[i] = rd.data[i];
      end
      begin
        w = gen.next();
        ref_encode(rd, w, bits, pat);
        noise = {$urandom(), $urandom()};
        win = noise >> bits.size();
        foreach (bits[i]) win[CW_W-1-i] = bits[i];
        #1;
        check("word", word, w);
        check("len", len, bits.size());
        check("pattern", p, pat);
        check("push", push, (pat != P_ZZZZ && pat != P_ZZZX));
        check("bad", bad, 0);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
