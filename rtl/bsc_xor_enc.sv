// XOR operation block of the encoder, one lane of CODE_W bits.
//
// Each bit of the incoming word is XORed with the same bit of the previous
// original word, which the block keeps in a register. The first word of a
// transaction is passed through unchanged, because it is the base the receiver
// restores the others from. When en is low every word passes through.
//
// Timing: q is combinational from d, first and the stored word. The register
// takes d on every cycle that load is high (the word is accepted downstream).
// The structure (a register per bit, an XOR gate and a bypass multiplexer)
// follows the method; the reset value of zero and the en input are this
// design's choices.
module bsc_xor_enc #(
  parameter int unsigned CODE_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,     // XOR step enabled
  input  logic              first,  // current word is the first of a transaction
  input  logic              load,   // current word is accepted this cycle
  input  logic [CODE_W-1:0] d,      // original word
  output logic [CODE_W-1:0] q       // XOR-coded word
);

  logic [CODE_W-1:0] prev_q;

  always_ff @(posedge clk) begin
    if (!rst_n)    prev_q <= '0;
    else if (load) prev_q <= d;
  end

  always_comb q = (first || !en) ? d : (d ^ prev_q);

endmodule
