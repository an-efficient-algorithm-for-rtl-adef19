// cpack_ref_pkg: a behavioural reference model of C-Pack for the
// testbenches, written independently of the RTL.
//
// The model works one word at a time on a dictionary kept as a plain array
// with a FIFO write pointer and valid bits. Coding a pair of words in one
// cycle, as the RTL does, must give the same result as coding them in
// sequence here. It also packs codes into a stream held as a queue of bits
// and produces test words with a mix of the patterns C-Pack exploits.
package cpack_ref_pkg;

  typedef struct {
    int unsigned entries;
    int unsigned idx_w;
    int unsigned wp;
    bit [31:0]   data  [64];
    bit          valid [64];
  } ref_dict_t;

  function automatic void dict_init(ref ref_dict_t d, input int unsigned entries);
    d.entries = entries;
    d.idx_w   = (entries > 1) ? $clog2(entries) : 1;
    d.wp      = 0;
    for (int i = 0; i < 64; i++) begin
      d.data[i]  = '0;
      d.valid[i] = 0;
    end
  endfunction

  function automatic void dict_push(ref ref_dict_t d, input bit [31:0] w);
    d.data[d.wp]  = w;
    d.valid[d.wp] = 1;
    d.wp = (d.wp + 1) % d.entries;
  endfunction

  // pattern numbers follow cpack_pkg::pattern_e
  localparam int P_ZZZZ = 0, P_XXXX = 1, P_MMMM = 2, P_MMXX = 3, P_ZZZX = 4, P_MMMX = 5;

  // Codes one word; returns its bits (first bit = index 0 of the queue) and
  // pattern, and updates the dictionary.
  function automatic void ref_encode(ref ref_dict_t d, input bit [31:0] w,
                                     output bit bits[$], output int pat);
    int full = -1, three = -1, two = -1;
    bits = {};
    for (int i = d.entries - 1; i >= 0; i--) begin
      if (d.valid[i] && d.data[i] == w)               full  = i;
      if (d.valid[i] && d.data[i][31:8] == w[31:8])   three = i;
      if (d.valid[i] && d.data[i][31:16] == w[31:16]) two   = i;
    end
    if (w == 0) begin
      pat = P_ZZZZ; bits = {1'b0, 1'b0};
    end else if (w[31:8] == 0) begin
      pat = P_ZZZX; bits = {1'b1, 1'b1, 1'b0, 1'b1};
      for (int b = 7; b >= 0; b--) bits.push_back(w[b]);
    end else begin
      if (full >= 0) begin
        pat = P_MMMM; bits = {1'b1, 1'b0};
        for (int b = d.idx_w - 1; b >= 0; b--) bits.push_back(full[b]);
      end else if (three >= 0) begin
        pat = P_MMMX; bits = {1'b1, 1'b1, 1'b1, 1'b0};
        for (int b = d.idx_w - 1; b >= 0; b--) bits.push_back(three[b]);
        for (int b = 7; b >= 0; b--) bits.push_back(w[b]);
      end else if (two >= 0) begin
        pat = P_MMXX; bits = {1'b1, 1'b1, 1'b0, 1'b0};
        for (int b = d.idx_w - 1; b >= 0; b--) bits.push_back(two[b]);
        for (int b = 15; b >= 0; b--) bits.push_back(w[b]);
      end else begin
        pat = P_XXXX; bits = {1'b0, 1'b1};
        for (int b = 31; b >= 0; b--) bits.push_back(w[b]);
      end
      dict_push(d, w);
    end
  endfunction

  // Right-aligned value of a short bit queue (up to 34 bits).
  function automatic bit [33:0] bits_value(bit bits[$]);
    bit [33:0] v = '0;
    foreach (bits[i]) v = {v[32:0], bits[i]};
    return v;
  endfunction

  // Test word generator: zeros, small values, repeats and near-repeats of
  // recent words, and random words.
  class word_gen;
    bit [31:0] recent[$];
    function bit [31:0] next();
      int unsigned r = $urandom_range(0, 99);
      bit [31:0] w;
      bit [31:0] base = recent.size() > 0 ? recent[$urandom_range(0, recent.size() - 1)]
                                           : $urandom();
      if (r < 12)      w = 32'd0;
      else if (r < 24) w = {24'd0, 8'($urandom_range(1, 255))};
      else if (r < 40) w = base;
      else if (r < 55) w = {base[31:8], 8'($urandom())};
      else if (r < 70) w = {base[31:16], 16'($urandom())};
      else             w = $urandom();
      recent.push_back(w);
      if (recent.size() > 24) void'(recent.pop_front());
      return w;
    endfunction
  endclass

endpackage
