// tb_cpack_decompressor: feeds lines compressed by the reference model into
// the decompressor at its default sizes and checks every rebuilt word, the
// rate (one pair per cycle, first pair two cycles after the line is taken,
// out_last on the last pair), that in_ready stays low while a line is
// decoded, and that the error flag is raised for a stream holding the
// unused code 1111 and for a stream whose length does not match in_bits,
// and only then.
module tb_cpack_decompressor;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int LW = 16;
  localparam int MAXBITS = LW * CW_W;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic [MAXBITS-1:0] in_line;
  logic [9:0]  in_bits;
  logic        out_valid, out_last, error;
  logic [63:0] out_data;

  cpack_decompressor dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_line, .in_bits,
    .out_valid, .out_data, .out_last, .error
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
    bit [31:0] w [LW];
    int        mode;

    in_valid = 0; in_line = 0; in_bits = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int ln = 0; ln < 600; ln++) begin
      // mode 0: good line, 1: code 1111 injected, 2: wrong length
      mode = (ln % 40 == 7) ? 1 : (ln % 40 == 23) ? 2 : 0;
      for (int i = 0; i < LW; i++) w[i] = (ln % 50 == 3) ? $urandom() : gen.next();
      dict_init(rd, 16);
      line_bits = {};
      for (int i = 0; i < LW; i++) begin
        ref_encode(rd, w[i], bits, pat);
        foreach (bits[k]) line_bits.push_back(bits[k]);
      end
      if (mode == 1) begin
        // overwrite the start of the stream with code 1111
        for (int k = 0; k < 4; k++) line_bits[k] = 1'b1;
      end
      @(negedge clk);
      check("in_ready idle", in_ready, 1);
      in_valid = 1;
      in_line  = '0;
      foreach (line_bits[i]) in_line[MAXBITS-1-i] = line_bits[i];
      in_bits  = 10'(line_bits.size() + (mode == 2 ? 1 : 0));
      @(posedge clk); #1;
      in_valid = 0;
      in_line  = '0;
      // one cycle of decoding before the first pair is registered
      check("in_ready busy", in_ready, 0);
      check("no early out", out_valid, 0);
      for (int b = 0; b < LW / 2; b++) begin
        @(posedge clk); #1;
        check("out_valid", out_valid, 1);
        check("out_last", out_last, (b == LW / 2 - 1));
        if (mode == 0) check("words", out_data, {w[2*b+1], w[2*b]});
        if (b < LW / 2 - 1) check("in_ready busy", in_ready, 0);
        if (b == LW / 2 - 1) check("error", error, (mode != 0));
        else                 check("no error mid-line", error, 0);
      end
      // random gap
      repeat ($urandom_range(0, 2)) begin
        @(posedge clk); #1;
        check("idle out", out_valid, 0);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
