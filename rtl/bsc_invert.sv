// Inverting operation block, one lane of CODE_W bits; used in both the encoder
// and the decoder.
//
// Counting the first word of a transaction as word one, the even-numbered words
// (t+1, t+3, ...) are inverted bit by bit and the odd-numbered ones pass through.
// After the XOR step a slowly changing stream tends to have zeros in its upper
// bits and ones in its lower bits, so each word ends with a one and the next
// starts with a zero; inverting every second word removes that transition at the
// word boundary. The inversion is its own inverse, so the decoder uses the same
// block.
//
// The rule and its place between the XOR block and the gray encoder follow the
// method. Timing: purely combinational. odd is supplied by the controller of the
// encoder or decoder, which counts the words of the transaction.
module bsc_invert #(
  parameter int unsigned CODE_W = 8
) (
  input  logic              en,   // inverting step enabled
  input  logic              odd,  // word index (first word = 0) is odd
  input  logic [CODE_W-1:0] d,
  output logic [CODE_W-1:0] q
);

  always_comb q = (en && odd) ? ~d : d;

endmodule
