// tb_cpack_image_workload: runs image data of the sizes at the two ends of
// the first row of the recommended-ratio table (1 kB and 700 kB, for which
// a 4:1 ratio is recommended) through cpack_top at its default sizes.
//
// The images are generated here: 8-bit grey pixels, four per 32-bit word,
// width 256, made of flat black areas, flat grey areas, horizontal
// gradients and noisy texture, so that every kind of code is used. Each
// 64-byte line is compressed, then decompressed while the next line is
// compressed, and must come back unchanged; its compressed length must
// equal the reference model's. The line rate (8 cycles per 16-word line
// on the compressor) is checked from the total cycle count. The ratio
// reached on each image (uncompressed size over compressed size) is
// printed next to the recommended 4:1; it is a property of the data, not
// a pass criterion.
module tb_cpack_image_workload;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int LW = 16;
  localparam int MAXBITS = LW * CW_W;

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
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one grey pixel of a 256-wide synthetic image
  function automatic bit [7:0] pixel(int x, int y);
    int region = ((y / 32) * 3 + (x / 64)) % 4;
    case (region)
      0: return 8'd0;                                   // black
      1: return 8'd128;                                 // flat grey
      2: return 8'(x);                                  // gradient
      default: return 8'(64 + $urandom_range(0, 15));   // texture
    endcase
  endfunction

  typedef struct {
    bit [31:0]          w [LW];
    logic [MAXBITS-1:0] line;
    int                 bits;
  } line_t;
  line_t store[$];
  bit    producing;

  task automatic run_image(int bytes);
    int lines = bytes / (4 * LW);
    longint out_bits = 0;
    int start_cycle, end_cycle, done = 0;
    ref_dict_t rd;
    bit        bits[$];
    int        pat, exp_bits;
    line_t     ln;
    fork
      begin : producer
        start_cycle = cycle;
        for (int n = 0; n < lines; n++) begin
          for (int i = 0; i < LW; i++) begin
            int p = (n * LW + i) * 4;        // first pixel of the word
            int x = p % 256, y = p / 256;
            ln.w[i] = {pixel(x + 3, y), pixel(x + 2, y), pixel(x + 1, y), pixel(x, y)};
          end
          dict_init(rd, 16);
          exp_bits = 0;
          for (int i = 0; i < LW; i++) begin
            ref_encode(rd, ln.w[i], bits, pat);
            exp_bits += bits.size();
          end
          for (int b = 0; b < LW / 2; b++) begin
            @(negedge clk);
            comp_in_valid = 1;
            comp_in_data  = {ln.w[2*b+1], ln.w[2*b]};
          end
          @(negedge clk);
          comp_in_valid = 0;
          check("compressed length", comp_out_bits, exp_bits);
          out_bits += comp_out_bits;
          ln.line = comp_out_line;
          ln.bits = comp_out_bits;
          store.push_back(ln);
          // the next line's first beat goes in on the cycle after its result
        end
        end_cycle = cycle;
      end
      begin : consumer
        line_t cl;
        while (done < lines) begin
          wait (store.size() > 0);
          cl = store.pop_front();
          @(negedge clk);
          while (!decomp_in_ready) @(negedge clk);
          decomp_in_valid = 1;
          decomp_in_line  = cl.line;
          decomp_in_bits  = 10'(cl.bits);
          @(negedge clk);
          decomp_in_valid = 0;
          for (int b = 0; b < LW / 2; b++) begin
            @(negedge clk);
            check("image round trip", decomp_out_data, {cl.w[2*b+1], cl.w[2*b]});
          end
          done++;
        end
      end
    join
    // compressor: 8 beats per line plus the one cycle spent reading its result
    check("compressor cycles", end_cycle - start_cycle, lines * (LW / 2 + 1));
    $display("image %0d bytes: %0d lines, %0d bits -> %0d bits, ratio %0.2f:1 (recommended 4:1)",
             bytes, lines, bytes * 8, out_bits, real'(bytes * 8) / real'(out_bits));
  endtask

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    comp_in_valid = 0; comp_in_data = 0;
    decomp_in_valid = 0; decomp_in_line = 0; decomp_in_bits = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_image(1024);
    run_image(700 * 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
