// XOR operation block of the decoder, one lane of CODE_W bits.
//
// Undoes the encoder's XOR step: every word but the first of a transaction is
// XORed with the previously restored word, which the block keeps in a register
// fed from its own output. The first word is passed through and becomes the base
// for the next one. When en is low every word passes through.
//
// Timing: q is combinational; the register takes q on every cycle with load
// high. The register-on-output structure follows the method; the reset value
// and the en input are this design's choices.
module bsc_xor_dec #(
  parameter int unsigned CODE_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,     // XOR step enabled (must match the encoder)
  input  logic              first,  // current word is the first of a transaction
  input  logic              load,   // current word is valid this cycle
  input  logic [CODE_W-1:0] d,      // word after the inverting block
  output logic [CODE_W-1:0] q       // restored original word
);

  logic [CODE_W-1:0] prev_q;

  always_comb q = (first || !en) ? d : (d ^ prev_q);

  always_ff @(posedge clk) begin
    if (!rst_n)    prev_q <= '0;
    else if (load) prev_q <= q;
  end

endmodule
