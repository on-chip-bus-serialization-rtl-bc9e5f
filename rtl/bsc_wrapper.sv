// Codec of one bus wrapper: the encoder for its outgoing serial wire and the
// decoder for its incoming one.
//
// Every wrapper that joins a hardware module to the serialized bus holds one
// encoder and one decoder, so that two wrappers joined by a pair of serial wires
// form a full-duplex link. Both directions use the same coding setting cfg.
// Interface and timing are those of bsc_encoder (tx side) and bsc_decoder (rx
// side); the two directions are independent.
module bsc_wrapper
  import bsc_pkg::*;
#(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned CODE_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bsc_cfg_t          cfg,
  // outgoing words
  input  logic              tx_valid,
  output logic              tx_ready,
  input  logic [WORD_W-1:0] tx_data,
  input  logic              tx_first,
  output bsc_ser_t          ser_tx,
  // incoming words
  input  bsc_ser_t          ser_rx,
  output logic              rx_valid,
  output logic [WORD_W-1:0] rx_data,
  output logic              rx_first
);

  bsc_encoder #(.WORD_W(WORD_W), .CODE_W(CODE_W)) u_enc (
    .clk, .rst_n, .cfg, .in_valid(tx_valid), .in_ready(tx_ready),
    .in_data(tx_data), .in_first(tx_first), .ser(ser_tx));

  bsc_decoder #(.WORD_W(WORD_W), .CODE_W(CODE_W)) u_dec (
    .clk, .rst_n, .cfg, .ser(ser_rx), .out_valid(rx_valid),
    .out_data(rx_data), .out_first(rx_first));

endmodule
