// Serialized on-chip bus section: two bus wrappers joined by a full-duplex pair
// of coded serial wires, and one coded unidirectional back-bus.
//
// In the serialized bus every wrapper that connects a hardware module to the
// bus carries an encoder and a decoder, and each parallel bus is replaced by
// full-duplex serial wires; the back-buses between accelerators carry one-way
// traffic and use a single serial wire. This top builds one instance of each
// kind of connection: wrapper A and wrapper B exchange words in both directions
// (ser_ab from A to B, ser_ba from B to A), and the back-bus link codes words
// from bb_tx_* and restores them on bb_rx_*. The serial links are brought out so
// their transitions can be observed. The hardware modules, the bus protocol
// logic of the wrappers and the transceiver cells are outside this design; their
// parallel word streams are the top's ports.
//
// Timing: one clock, the serial bit clock; each link moves one bit per cycle, so
// a WORD_W-bit word takes WORD_W cycles plus LANES indicator bits at the start of
// each transaction, and arrives one cycle after its last bit.
module bsc_top
  import bsc_pkg::*;
#(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned CODE_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bsc_cfg_t          cfg,
  // wrapper A, parallel side
  input  logic              a_tx_valid,
  output logic              a_tx_ready,
  input  logic [WORD_W-1:0] a_tx_data,
  input  logic              a_tx_first,
  output logic              a_rx_valid,
  output logic [WORD_W-1:0] a_rx_data,
  output logic              a_rx_first,
  // wrapper B, parallel side
  input  logic              b_tx_valid,
  output logic              b_tx_ready,
  input  logic [WORD_W-1:0] b_tx_data,
  input  logic              b_tx_first,
  output logic              b_rx_valid,
  output logic [WORD_W-1:0] b_rx_data,
  output logic              b_rx_first,
  // back-bus link
  input  logic              bb_tx_valid,
  output logic              bb_tx_ready,
  input  logic [WORD_W-1:0] bb_tx_data,
  input  logic              bb_tx_first,
  output logic              bb_rx_valid,
  output logic [WORD_W-1:0] bb_rx_data,
  output logic              bb_rx_first,
  // serial wires, for observation
  output bsc_ser_t          ser_ab,
  output bsc_ser_t          ser_ba,
  output bsc_ser_t          ser_bb
);

  bsc_wrapper #(.WORD_W(WORD_W), .CODE_W(CODE_W)) u_wrap_a (
    .clk, .rst_n, .cfg,
    .tx_valid(a_tx_valid), .tx_ready(a_tx_ready), .tx_data(a_tx_data),
    .tx_first(a_tx_first), .ser_tx(ser_ab),
    .ser_rx(ser_ba), .rx_valid(a_rx_valid), .rx_data(a_rx_data), .rx_first(a_rx_first));

  bsc_wrapper #(.WORD_W(WORD_W), .CODE_W(CODE_W)) u_wrap_b (
    .clk, .rst_n, .cfg,
    .tx_valid(b_tx_valid), .tx_ready(b_tx_ready), .tx_data(b_tx_data),
    .tx_first(b_tx_first), .ser_tx(ser_ba),
    .ser_rx(ser_ab), .rx_valid(b_rx_valid), .rx_data(b_rx_data), .rx_first(b_rx_first));

  bsc_encoder #(.WORD_W(WORD_W), .CODE_W(CODE_W)) u_bb_enc (
    .clk, .rst_n, .cfg, .in_valid(bb_tx_valid), .in_ready(bb_tx_ready),
    .in_data(bb_tx_data), .in_first(bb_tx_first), .ser(ser_bb));

  bsc_decoder #(.WORD_W(WORD_W), .CODE_W(CODE_W)) u_bb_dec (
    .clk, .rst_n, .cfg, .ser(ser_bb), .out_valid(bb_rx_valid),
    .out_data(bb_rx_data), .out_first(bb_rx_first));

endmodule
