// Gray decoder, one lane of CODE_W bits.
//
// When the indicator bit of the transaction says the first word was sent as a
// gray code, the binary word is rebuilt by an XOR chain running from the top bit
// down: b[n-1] = B[n-1], b[i-1] = b[i] ^ B[i-1]. Other words pass through.
//
// The chain differs from the encoder's only in taking the bit above from its own
// output instead of its input; this is what makes it the inverse of the encoder.
// The method describes the gray decoder as the same circuit as the encoder;
// taken literally that would not restore the word (51h -> 79h -> 45h), so this
// design uses the inverse chain. Timing: purely combinational.
module bsc_gray_dec #(
  parameter int unsigned CODE_W = 8
) (
  input  logic              sel,    // indicator bit: first word was gray-encoded
  input  logic              first,  // current word is the first of a transaction
  input  logic [CODE_W-1:0] d,
  output logic [CODE_W-1:0] q
);

  logic [CODE_W-1:0] bin;

  always_comb begin
    bin[CODE_W-1] = d[CODE_W-1];
    for (int i = CODE_W - 1; i >= 1; i--) bin[i-1] = bin[i] ^ d[i-1];
  end

  always_comb q = (sel && first) ? bin : d;

endmodule
