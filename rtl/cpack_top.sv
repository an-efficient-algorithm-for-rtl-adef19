// cpack_top: the per-core C-Pack compressor/decompressor of a private L2
// cache that is split into an uncompressed region and a compressed region.
//
// Lines leaving the uncompressed region are compressed, two words per
// cycle, into a variable-length bit stream for the compressed region; lines
// read back from the compressed region are decompressed, two words per
// cycle, for the uncompressed region. The two paths work independently and
// at the same time, each with its own dictionary, which is emptied at
// every line so that each line can be decompressed on its own.
//
// The cache regions, the L1 caches, the processor and the interconnect
// around this unit are not part of this RTL: their connections are the
// ports below.
//   comp_*      line in from the uncompressed region (two words per cycle)
//               and compressed line out to the compressed region
//   decomp_*    compressed line in from the compressed region and words out
//               to the uncompressed region
// Timing is that of cpack_compressor and cpack_decompressor. Reset is
// asynchronous, active low.
//
// The placement of one compressor/decompressor per core between the two
// L2 regions follows the document's system architecture; the separate
// ports for the two directions are this design's choice.
module cpack_top #(
  parameter int unsigned ENTRIES    = 16,
  parameter int unsigned LINE_WORDS = 16,
  localparam int unsigned MAXBITS   = LINE_WORDS * cpack_pkg::CW_W,
  localparam int unsigned BITS_W    = $clog2(MAXBITS + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // compression path
  input  logic                           comp_in_valid,
  input  logic [2*cpack_pkg::WORD_W-1:0] comp_in_data,
  output logic                           comp_out_valid,
  output logic [MAXBITS-1:0]             comp_out_line,
  output logic [BITS_W-1:0]              comp_out_bits,
  output logic                           comp_cw_valid,
  output cpack_pkg::pattern_e            comp_pat1,
  output cpack_pkg::pattern_e            comp_pat2,
  // decompression path
  input  logic                           decomp_in_valid,
  output logic                           decomp_in_ready,
  input  logic [MAXBITS-1:0]             decomp_in_line,
  input  logic [BITS_W-1:0]              decomp_in_bits,
  output logic                           decomp_out_valid,
  output logic [2*cpack_pkg::WORD_W-1:0] decomp_out_data,
  output logic                           decomp_out_last,
  output logic                           decomp_error
);

  cpack_compressor #(.ENTRIES(ENTRIES), .LINE_WORDS(LINE_WORDS)) u_comp (
    .clk, .rst_n,
    .in_valid (comp_in_valid),
    .in_data  (comp_in_data),
    .cw_valid (comp_cw_valid),
    .cw1(), .len1(), .pat1(comp_pat1),
    .cw2(), .len2(), .pat2(comp_pat2),
    .out_valid(comp_out_valid),
    .out_line (comp_out_line),
    .out_bits (comp_out_bits)
  );

  cpack_decompressor #(.ENTRIES(ENTRIES), .LINE_WORDS(LINE_WORDS)) u_decomp (
    .clk, .rst_n,
    .in_valid (decomp_in_valid),
    .in_ready (decomp_in_ready),
    .in_line  (decomp_in_line),
    .in_bits  (decomp_in_bits),
    .out_valid(decomp_out_valid),
    .out_data (decomp_out_data),
    .out_last (decomp_out_last),
    .error    (decomp_error)
  );

endmodule
