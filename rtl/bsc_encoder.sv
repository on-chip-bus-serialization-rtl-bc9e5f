// Hardware encoder of the low-power bus serialization method.
//
// A stream of parallel bus words is coded so that, once serialized, it makes few
// more transitions than the parallel bus did. The word is split into byte lanes
// of CODE_W bits and each lane goes through three steps, in this order:
//   1. XOR block: every word but the first of a transaction is XORed with the
//      previous original word of its lane (word-to-word correlation);
//   2. inverting block: words t+1, t+3, ... are inverted, which removes the
//      transition where one serialized word meets the next;
//   3. gray encoder: the first word is sent as its gray code when that gives
//      fewer bit-to-bit transitions (bit-by-bit correlation); the choice travels
//      as one indicator bit per lane ahead of the word.
// The serializer then shifts the word out, most significant bit first.
//
// Interface: in_valid/in_ready handshake; in_first marks the first word of a
// transaction (the first word after reset is always treated as one). cfg turns
// the three steps on or off. Timing: the coding is combinational between the
// handshake and the serializer's load, so it adds no cycle; a word accepted in
// cycle k is on the wire from cycle k+1 for WORD_W cycles (WORD_W + LANES for
// the first word of a transaction).
// The steps, their order and their per-lane form follow the method; the
// 16-bit bus coded in two byte lanes with one history per lane, the handshake
// and the framing are this design's reading of it.
module bsc_encoder
  import bsc_pkg::*;
#(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned CODE_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bsc_cfg_t          cfg,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [WORD_W-1:0] in_data,
  input  logic              in_first,
  output bsc_ser_t          ser
);

  localparam int unsigned LANES = WORD_W / CODE_W;

  logic              load;
  logic              started_q;   // a first word has been sent since reset
  logic              odd_q;       // index of the next non-first word is odd
  logic              first;
  logic              odd;
  logic [WORD_W-1:0] x_word, v_word, g_word;
  logic [LANES-1:0]  ind;

  assign first = in_first || !started_q;
  assign odd   = !first && odd_q;
  assign load  = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      started_q <= 1'b0;
      odd_q     <= 1'b0;
    end else if (load) begin
      started_q <= 1'b1;
      odd_q     <= first ? 1'b1 : !odd_q;
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    bsc_xor_enc #(.CODE_W(CODE_W)) u_xor (
      .clk, .rst_n, .en(cfg.xor_en), .first, .load,
      .d(in_data[l*CODE_W +: CODE_W]), .q(x_word[l*CODE_W +: CODE_W]));
    bsc_invert #(.CODE_W(CODE_W)) u_inv (
      .en(cfg.inv_en), .odd,
      .d(x_word[l*CODE_W +: CODE_W]), .q(v_word[l*CODE_W +: CODE_W]));
    bsc_gray_enc #(.CODE_W(CODE_W)) u_gray (
      .en(cfg.gray_en), .first,
      .d(v_word[l*CODE_W +: CODE_W]), .q(g_word[l*CODE_W +: CODE_W]), .sel(ind[l]));
  end

  bsc_serializer #(.WORD_W(WORD_W), .LANES(LANES)) u_ser (
    .clk, .rst_n, .in_valid, .in_ready, .in_word(g_word), .in_first(first),
    .in_ind(ind), .ser);

  initial assert (WORD_W % CODE_W == 0 && CODE_W >= 2)
    else $error("WORD_W must be a multiple of CODE_W");

  a_hold_while_stalled: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_data) && $stable(in_first));

endmodule
