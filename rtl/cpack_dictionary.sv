// cpack_dictionary: the dynamically updated dictionary of C-Pack.
//
// Holds the last ENTRIES words that did not match a static pattern, each
// with a valid bit. Up to two words are pushed per cycle, word 1 before
// word 2, into the slot named by a write pointer that wraps around, so the
// oldest entry is the one replaced (FIFO replacement). The compressor and
// the decompressor each own one instance and push the same words in the
// same order, so both hold the same contents at every word.
//
// Interface and timing:
//   entries/valid   contents at the start of the cycle; word 1 of a pair is
//                   compared against these.
//   fwd_entries/    contents as they are after word 1's push of this cycle
//   fwd_valid       (combinational); word 2 of a pair is compared against
//                   these, so a pair is coded exactly as if its two words
//                   had come one at a time.
//   clear           empties the dictionary at the next edge (start of a new
//                   cache line); pushes in the same cycle are dropped.
//   Pushes take effect at the rising clock edge. Reset is asynchronous,
//   active low, and empties the dictionary.
//
// The document gives the dictionary's role, the push of every word that
// failed the static patterns, and a 4-bit index (16 entries). The FIFO
// replacement, the valid bits and the clearing per line are this design's
// choices.
module cpack_dictionary #(
  parameter int unsigned ENTRIES = 16,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          push1,
  input  logic [cpack_pkg::WORD_W-1:0]  data1,
  input  logic                          push2,
  input  logic [cpack_pkg::WORD_W-1:0]  data2,
  output logic [cpack_pkg::WORD_W-1:0]  entries     [ENTRIES],
  output logic [ENTRIES-1:0]            valid,
  output logic [cpack_pkg::WORD_W-1:0]  fwd_entries [ENTRIES],
  output logic [ENTRIES-1:0]            fwd_valid,
  output logic [IDX_W-1:0]              wr_ptr
);
  localparam int unsigned WORD_W = cpack_pkg::WORD_W;

  logic [WORD_W-1:0] mem   [ENTRIES];
  logic [ENTRIES-1:0] vld;
  logic [IDX_W-1:0]  wp;

  function automatic logic [IDX_W-1:0] next_idx(logic [IDX_W-1:0] i);
    return (i == IDX_W'(ENTRIES - 1)) ? '0 : i + 1'b1;
  endfunction

  // pointer after word 1's push, where word 2 goes
  logic [IDX_W-1:0] wp1;
  assign wp1 = push1 ? next_idx(wp) : wp;

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      entries[i] = mem[i];
      if (push1 && wp == IDX_W'(i)) begin
        fwd_entries[i] = data1;
        fwd_valid[i]   = 1'b1;
      end else begin
        fwd_entries[i] = mem[i];
        fwd_valid[i]   = vld[i];
      end
    end
  end

  assign valid  = vld;
  assign wr_ptr = wp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      wp  <= '0;
      for (int i = 0; i < ENTRIES; i++) mem[i] <= '0;
    end else if (clear) begin
      vld <= '0;
      wp  <= '0;
    end else begin
      if (push1) begin
        mem[wp] <= data1;
        vld[wp] <= 1'b1;
      end
      if (push2) begin
        mem[wp1] <= data2;
        vld[wp1] <= 1'b1;
      end
      wp <= push2 ? next_idx(wp1) : wp1;
    end
  end

endmodule
