// Hardware decoder of the low-power bus serialization method.
//
// Undoes the encoder in reverse order. The deserializer rebuilds each word and
// tells which word is the first of a transaction; then, per byte lane of CODE_W
// bits:
//   1. gray decoder: the first word is gray-decoded if its lane's indicator bit
//      is set;
//   2. inverting block: words t+1, t+3, ... are inverted back;
//   3. XOR block: every word but the first is XORed with the previously restored
//      word of its lane.
//
// Interface: the serial link in, restored words out as a one-cycle out_valid
// pulse with out_first. cfg.xor_en and cfg.inv_en must match the encoder;
// cfg.gray_en is not needed here because the indicator bits carry the choice.
// Timing: the decoding is combinational after the deserializer, so a word is
// presented in the cycle after its last bit arrives.
module bsc_decoder
  import bsc_pkg::*;
#(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned CODE_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bsc_cfg_t          cfg,
  input  bsc_ser_t          ser,
  output logic              out_valid,
  output logic [WORD_W-1:0] out_data,
  output logic              out_first
);

  localparam int unsigned LANES = WORD_W / CODE_W;

  logic              d_valid;
  logic [WORD_W-1:0] d_word, g_word, v_word;
  logic              d_first;
  logic [LANES-1:0]  d_ind;
  logic              odd_q;
  logic              odd;

  bsc_deserializer #(.WORD_W(WORD_W), .LANES(LANES)) u_des (
    .clk, .rst_n, .ser, .out_valid(d_valid), .out_word(d_word),
    .out_first(d_first), .out_ind(d_ind));

  assign odd = !d_first && odd_q;

  always_ff @(posedge clk) begin
    if (!rst_n)       odd_q <= 1'b0;
    else if (d_valid) odd_q <= d_first ? 1'b1 : !odd_q;
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    bsc_gray_dec #(.CODE_W(CODE_W)) u_gray (
      .sel(d_ind[l]), .first(d_first),
      .d(d_word[l*CODE_W +: CODE_W]), .q(g_word[l*CODE_W +: CODE_W]));
    bsc_invert #(.CODE_W(CODE_W)) u_inv (
      .en(cfg.inv_en), .odd,
      .d(g_word[l*CODE_W +: CODE_W]), .q(v_word[l*CODE_W +: CODE_W]));
    bsc_xor_dec #(.CODE_W(CODE_W)) u_xor (
      .clk, .rst_n, .en(cfg.xor_en), .first(d_first), .load(d_valid),
      .d(v_word[l*CODE_W +: CODE_W]), .q(out_data[l*CODE_W +: CODE_W]));
  end

  assign out_valid = d_valid;
  assign out_first = d_first;

endmodule
