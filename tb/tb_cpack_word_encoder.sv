// tb_cpack_word_encoder: checks the word encoder against the reference
// model. First the three worked examples of the C-Pack description with a
// four-entry dictionary {12345678, AAAAAAAA, 12340000, 3527894E}:
// 000000AB -> (1101)AB, BBBB2022 -> (01)BBBB2022 and 123456AA ->
// (1110)(00)AA. Then random words against random, partly valid
// dictionaries of the default 16 entries, with words built to hit every
// pattern.
module tb_cpack_word_encoder;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  int checks = 0, failures = 0;

  // four-entry instance for the worked examples
  logic [31:0] w4;
  logic [31:0] d4 [4];
  logic [3:0]  v4;
  pattern_e    p4;
  logic [CW_W-1:0]  cw4;
  logic [LEN_W-1:0] len4;
  logic [1:0]  idx4;
  logic        push4;

  cpack_word_encoder #(.ENTRIES(4)) dut4 (
    .word(w4), .dict(d4), .dict_valid(v4),
    .pattern(p4), .cw(cw4), .len(len4), .idx(idx4), .push(push4)
  );

  // default instance
  logic [31:0] w;
  logic [31:0] d [16];
  logic [15:0] v;
  pattern_e    p;
  logic [CW_W-1:0]  cw;
  logic [LEN_W-1:0] len;
  logic [3:0]  idx;
  logic        push;

  cpack_word_encoder dut (
    .word(w), .dict(d), .dict_valid(v),
    .pattern(p), .cw(cw), .len(len), .idx(idx), .push(push)
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

    // worked examples
    d4 = '{32'h12345678, 32'hAAAAAAAA, 32'h12340000, 32'h3527894E};
    v4 = 4'hF;
    w4 = 32'h000000AB; #1;
    check("000000AB len", len4, 12);
    check("000000AB cw",  cw4,  {4'b1101, 8'hAB});
    check("000000AB push", push4, 0);
    w4 = 32'hBBBB2022; #1;
    check("BBBB2022 len", len4, 34);
    check("BBBB2022 cw",  cw4,  {2'b01, 32'hBBBB2022});
    check("BBBB2022 push", push4, 1);
    w4 = 32'h123456AA; #1;
    check("123456AA len", len4, 14);
    check("123456AA cw",  cw4,  {4'b1110, 2'b00, 8'hAA});
    check("123456AA pat", p4,   PAT_MMMX);
    w4 = 32'h00000000; #1;
    check("zero cw", {len4, cw4}, {6'd2, 34'b00});
    w4 = 32'hAAAAAAAA; #1;
    check("full match", {len4, cw4}, {6'd4, 30'd0, 4'b1001});
    w4 = 32'h1234BEEF; #1;
    // 1234 also heads 12340000 (index 2); the lowest index wins
    check("mmxx", {len4, cw4}, {6'd22, 34'({4'b1100, 2'b00, 16'hBEEF})});

    // random against the reference model
    for (int t = 0; t < 4000; t++) begin
      dict_init(rd, 16);
      for (int i = 0; i < 16; i++) begin
        if ($urandom_range(0, 3) != 0) begin
          rd.data[i]  = gen.next();
          rd.valid[i] = 1;
        end
        d[i] = rd.data[i];
        v[i] = rd.valid[i];
      end
      w = gen.next();
      #1;
      ref_encode(rd, w, bits, pat);
      check("len", len, bits.size());
      check("cw", cw, bits_value(bits));
      check("pattern", p, pat);
      check("push", push, (pat != P_ZZZZ && pat != P_ZZZX));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
