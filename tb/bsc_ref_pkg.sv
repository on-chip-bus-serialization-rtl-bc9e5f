// Reference model of the bus serialization code, for the testbenches.
//
// Written directly from the coding rules, independently of the RTL structure:
// gray code as v ^ (v >> 1), its inverse as a running XOR from the top bit,
// transition counts by comparing adjacent bits, and the serial frame as a bit
// queue (indicator bits of every lane, highest lane first, then each word most
// significant bit first). Words are held in 64-bit vectors; n is the used width.
package bsc_ref_pkg;

  typedef logic [63:0] word_t;

  function automatic int unsigned trans(word_t v, int unsigned n);
    int unsigned c = 0;
    for (int unsigned i = 1; i < n; i++) if (v[i] != v[i-1]) c++;
    return c;
  endfunction

  function automatic word_t mask(int unsigned n);
    return (n >= 64) ? '1 : ((word_t'(1) << n) - 1);
  endfunction

  function automatic word_t gray(word_t v, int unsigned n);
    return (v & mask(n)) ^ ((v & mask(n)) >> 1);
  endfunction

  function automatic word_t ungray(word_t v, int unsigned n);
    word_t b = '0;
    logic acc = 1'b0;
    for (int i = int'(n) - 1; i >= 0; i--) begin
      acc  = acc ^ v[i];
      b[i] = acc;
    end
    return b;
  endfunction

  // Codes one lane word. idx is the word's index in its transaction (0 = first),
  // prev the previous original word of the lane.
  function automatic word_t enc_lane(word_t w, word_t prev, int unsigned idx,
                                     logic xor_en, logic inv_en, logic gray_en,
                                     int unsigned n, output logic ind);
    word_t c = w & mask(n);
    ind = 1'b0;
    if (idx == 0) begin
      if (gray_en && trans(gray(c, n), n) < trans(c, n)) begin
        c   = gray(c, n);
        ind = 1'b1;
      end
    end else begin
      if (xor_en) c = c ^ (prev & mask(n));
      if (inv_en && (idx % 2 == 1)) c = ~c & mask(n);
    end
    return c;
  endfunction

  // Appends the bits of an n-bit value to a queue, most significant first.
  function automatic void push_bits(ref logic q[$], input word_t v, input int unsigned n);
    for (int i = int'(n) - 1; i >= 0; i--) q.push_back(v[i]);
  endfunction

  // Codes one transaction of whole bus words and appends its serial frame.
  function automatic void enc_frame(ref logic q[$], const ref word_t words[$],
                                    input logic xor_en, logic inv_en, logic gray_en,
                                    int unsigned word_w, int unsigned code_w);
    int unsigned lanes = word_w / code_w;
    word_t coded[$];
    logic  inds[$];
    logic  ind;
    for (int unsigned k = 0; k < words.size(); k++) begin
      word_t cw = '0;
      for (int unsigned l = 0; l < lanes; l++) begin
        word_t lw = (words[k] >> (l * code_w)) & mask(code_w);
        word_t lp = (k == 0) ? '0 : ((words[k-1] >> (l * code_w)) & mask(code_w));
        word_t lc = enc_lane(lw, lp, k, xor_en, inv_en, gray_en, code_w, ind);
        cw |= lc << (l * code_w);
        if (k == 0) inds.push_back(ind);
      end
      coded.push_back(cw);
    end
    for (int l = int'(lanes) - 1; l >= 0; l--) q.push_back(inds[l]);
    foreach (coded[k]) push_bits(q, coded[k], word_w);
  endfunction

endpackage
