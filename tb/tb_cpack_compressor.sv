// tb_cpack_compressor: sends random cache lines (16 words, two per beat,
// with random idle cycles between beats) through the compressor at its
// default sizes and compares every compressed word and the packed line
// with the reference model, which codes the words one at a time. Checks
// the rate (one beat per cycle, a line done LINE_WORDS/2 beats after it
// starts) and that the result appears exactly one cycle after the last
// beat. Lines of all-zero words and of random words are included.
module tb_cpack_compressor;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int LW = 16;
  localparam int MAXBITS = LW * CW_W;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic        in_valid;
  logic [63:0] in_data;
  logic        cw_valid, out_valid;
  logic [CW_W-1:0]  cw1, cw2;
  logic [LEN_W-1:0] len1, len2;
  pattern_e    pat1, pat2;
  logic [MAXBITS-1:0] out_line;
  logic [9:0]  out_bits;

  cpack_compressor dut (
    .clk, .rst_n, .in_valid, .in_data,
    .cw_valid, .cw1, .len1, .pat1, .cw2, .len2, .pat2,
    .out_valid, .out_line, .out_bits
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_gen   gen = new();
    ref_dict_t rd;
    bit        bits[$], line_bits[$];
    int        pat;
    logic [MAXBITS-1:0] exp_line;
    bit [33:0] exp_cw [2];
    int        exp_len [2];
    bit [31:0] w [LW];
    int        last_beat_cycle, cycle;

    in_valid = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cycle = 0;

    for (int ln = 0; ln < 600; ln++) begin
      for (int i = 0; i < LW; i++) begin
        if (ln % 50 == 1)      w[i] = 32'd0;
        else if (ln % 50 == 2) w[i] = $urandom();
        else                   w[i] = gen.next();
      end
      dict_init(rd, 16);
      line_bits = {};
      for (int b = 0; b < LW / 2; b++) begin
        // optional idle cycles
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk); in_valid = 0;
          @(posedge clk); #1;
          check("no cw_valid when idle", cw_valid, 0);
          check("no out_valid when idle", out_valid, 0);
        end
        @(negedge clk);
        in_valid = 1;
        in_data  = {w[2*b+1], w[2*b]};
        for (int k = 0; k < 2; k++) begin
          ref_encode(rd, w[2*b+k], bits, pat);
          exp_cw[k]  = bits_value(bits);
          exp_len[k] = bits.size();
          foreach (bits[i]) line_bits.push_back(bits[i]);
        end
        @(posedge clk); #1;
        in_valid = 0;
        check("cw_valid", cw_valid, 1);
        check("cw1", cw1, exp_cw[0]);
        check("len1", len1, exp_len[0]);
        check("cw2", cw2, exp_cw[1]);
        check("len2", len2, exp_len[1]);
        // the line result comes exactly one cycle after the last beat
        check("out_valid timing", out_valid, (b == LW / 2 - 1));
      end
      exp_line = '0;
      foreach (line_bits[i]) exp_line[MAXBITS-1-i] = line_bits[i];
      check("out_bits", out_bits, line_bits.size());
      checks++;
      if (out_line !== exp_line) begin
        failures++;
        $display("FAIL line %0d: packed stream differs", ln);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
