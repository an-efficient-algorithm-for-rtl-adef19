// tb_cpack_top: end-to-end test of the compressor/decompressor unit at its
// default sizes (16-entry dictionary, 16-word lines). Cache lines are
// compressed two words per cycle; each compressed line is stored in a
// queue that stands in for the compressed L2 region, and is read back
// through the decompressor while the next lines are being compressed. Every
// line must come back unchanged, every compressed length must equal the
// reference model's, and the cycle counts are checked: LINE_WORDS/2
// cycles to compress a line plus one for the result, first pair two
// cycles after a line is taken for decompression, then one pair per cycle.
//
// The mechanisms of the design are counted and each must occur: all six
// code patterns, word 2 of a pair matching word 1 of the same pair through
// the forwarded dictionary, a line that does not shrink (more bits than the
// 512 uncompressed ones) and both paths working in the same cycle. The
// overall compression ratio, uncompressed over compressed size, is
// printed. (With 16 entries and a dictionary emptied at every 16-word line,
// no entry is ever replaced inside a line; tb_cpack_dictionary covers the
// replacement itself.)
module tb_cpack_top;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int LW = 16;
  localparam int MAXBITS = LW * CW_W;
  localparam int LINES = 400;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic        comp_in_valid, comp_out_valid, comp_cw_valid;
  logic [63:0] comp_in_data;
  logic [MAXBITS-1:0] comp_out_line;
  logic [9:0]  comp_out_bits;
  pattern_e    comp_pat1, comp_pat2;
  logic        decomp_in_valid, decomp_in_ready;
  logic [MAXBITS-1:0] decomp_in_line;
  logic [9:0]  decomp_in_bits;
  logic        decomp_out_valid, decomp_out_last, decomp_error;
  logic [63:0] decomp_out_data;

  cpack_top dut (
    .clk, .rst_n,
    .comp_in_valid, .comp_in_data,
    .comp_out_valid, .comp_out_line, .comp_out_bits,
    .comp_cw_valid, .comp_pat1, .comp_pat2,
    .decomp_in_valid, .decomp_in_ready, .decomp_in_line, .decomp_in_bits,
    .decomp_out_valid, .decomp_out_data, .decomp_out_last, .decomp_error
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
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lines in flight: original words, compressed stream and length
  typedef struct {
    bit [31:0]          w [LW];
    logic [MAXBITS-1:0] line;
    int                 bits;
  } line_t;
  line_t store[$];
  bit [31:0] sent[$][LW];

  int pat_count [6];
  int fwd_hits = 0, expanded = 0, overlap = 0;
  longint total_in_bits = 0, total_out_bits = 0;
  bit producer_done = 0;

  // pattern counting from the compressor's per-beat outputs
  always @(posedge clk) if (rst_n && comp_cw_valid) begin
    pat_count[comp_pat1]++;
    pat_count[comp_pat2]++;
  end
  always @(posedge clk) if (rst_n && comp_in_valid && !decomp_in_ready) overlap++;

  task automatic produce();
    word_gen   gen = new();
    ref_dict_t rd, pre;
    bit        bits[$];
    int        pat, exp_bits;
    bit [31:0] w [LW];
    line_t     ln;
    for (int n = 0; n < LINES; n++) begin
      for (int i = 0; i < LW; i++) w[i] = (n % 37 == 5) ? $urandom() : gen.next();
      dict_init(rd, 16);
      exp_bits = 0;
      for (int i = 0; i < LW; i++) begin
        // dictionary as it stood before word 1 of the pair
        if (i % 2 == 0) pre = rd;
        ref_encode(rd, w[i], bits, pat);
        exp_bits += bits.size();
        // word 2 coded from word 1 of the same pair: a dictionary code that
        // no entry older than word 1 could have given
        if (i % 2 == 1 && (pat == P_MMMM || pat == P_MMMX || pat == P_MMXX)) begin
          bit older = 0;
          bit w1_pushed = (w[i-1][31:8] != 0);
          for (int e = 0; e < 16; e++)
            if (pre.valid[e] && pre.data[e][31:16] == w[i][31:16] &&
                !(w1_pushed && pre.wp == e)) older = 1;
          if (!older) fwd_hits++;
        end
      end
      @(negedge clk);
      for (int b = 0; b < LW / 2; b++) begin
        comp_in_valid = 1;
        comp_in_data  = {w[2*b+1], w[2*b]};
        @(negedge clk);
      end
      comp_in_valid = 0;
      // result one cycle after the last beat
      check("comp_out_valid timing", comp_out_valid, 1);
      check("compressed length", comp_out_bits, exp_bits);
      if (exp_bits > 32 * LW) expanded++;
      total_in_bits  += 32 * LW;
      total_out_bits += comp_out_bits;
      ln.w    = w;
      ln.line = comp_out_line;
      ln.bits = comp_out_bits;
      store.push_back(ln);
    end
    producer_done = 1;
  endtask

  task automatic consume();
    line_t ln;
    int    done = 0;
    while (done < LINES) begin
      wait (store.size() > 0);
      ln = store.pop_front();
      @(negedge clk);
      while (!decomp_in_ready) @(negedge clk);
      decomp_in_valid = 1;
      decomp_in_line  = ln.line;
      decomp_in_bits  = 10'(ln.bits);
      @(negedge clk);
      decomp_in_valid = 0;
      check("no pair one cycle after take", decomp_out_valid, 0);
      for (int b = 0; b < LW / 2; b++) begin
        @(negedge clk);
        check("decomp_out_valid", decomp_out_valid, 1);
        check("round trip", decomp_out_data, {ln.w[2*b+1], ln.w[2*b]});
        check("decomp_out_last", decomp_out_last, (b == LW / 2 - 1));
        if (b == LW / 2 - 1) check("decomp_error", decomp_error, 0);
      end
      done++;
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    comp_in_valid = 0; comp_in_data = 0;
    decomp_in_valid = 0; decomp_in_line = 0; decomp_in_bits = 0;
    for (int i = 0; i < 6; i++) pat_count[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      produce();
      consume();
    join
    $display("mechanisms:");
    need("pattern zzzz", pat_count[PAT_ZZZZ]);
    need("pattern xxxx", pat_count[PAT_XXXX]);
    need("pattern mmmm", pat_count[PAT_MMMM]);
    need("pattern mmxx", pat_count[PAT_MMXX]);
    need("pattern zzzx", pat_count[PAT_ZZZX]);
    need("pattern mmmx", pat_count[PAT_MMMX]);
    need("word 2 matched word 1 of its pair", fwd_hits);
    need("lines larger than uncompressed", expanded);
    need("cycles with both paths busy", overlap);
    $display("compression ratio %0d bits / %0d bits = %0.3f",
             total_in_bits, total_out_bits, real'(total_in_bits) / real'(total_out_bits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
