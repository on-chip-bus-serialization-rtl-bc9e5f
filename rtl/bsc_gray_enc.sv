// Gray encoder with selection, one lane of CODE_W bits.
//
// Only the first word of a transaction is considered. Its gray code is formed by
// an XOR chain: the top bit is kept, and every lower bit is the XOR of that bit
// and the bit above it, B[n-1] = b[n-1], B[i-1] = b[i] ^ b[i-1]. The block counts
// the bit-to-bit transitions of the word as it would be shifted out (the number
// of adjacent bit pairs that differ) for both the original word and its gray
// code, and sends the gray code only when its count is strictly smaller. The
// choice is reported on sel, which the serializer sends to the receiver as the
// indicator bit. Words that are not first pass through.
//
// The XOR-chain form and the selection rule (gray code only when its count is
// smaller than the word's own) follow the method. The selection bounds the
// worst case of an 8-bit word at 5 transitions (49h and its gray code 6Dh both
// make 5). Timing: purely combinational.
module bsc_gray_enc #(
  parameter int unsigned CODE_W = 8
) (
  input  logic              en,     // gray step enabled
  input  logic              first,  // current word is the first of a transaction
  input  logic [CODE_W-1:0] d,
  output logic [CODE_W-1:0] q,
  output logic              sel     // q is the gray code of d
);

  logic [CODE_W-1:0]     gray;
  logic [$clog2(CODE_W+1)-1:0] tr_bin, tr_gray;

  always_comb begin
    gray[CODE_W-1] = d[CODE_W-1];
    for (int i = CODE_W - 1; i >= 1; i--) gray[i-1] = d[i] ^ d[i-1];
  end

  // Transitions between adjacent bits of the binary and of the gray word.
  always_comb begin
    tr_bin  = '0;
    tr_gray = '0;
    for (int i = 1; i < CODE_W; i++) begin
      tr_bin  = tr_bin  + {{($clog2(CODE_W+1)-1){1'b0}}, d[i]    ^ d[i-1]};
      tr_gray = tr_gray + {{($clog2(CODE_W+1)-1){1'b0}}, gray[i] ^ gray[i-1]};
    end
  end

  always_comb begin
    sel = en && first && (tr_bin > tr_gray);
    q   = sel ? gray : d;
  end

endmodule
