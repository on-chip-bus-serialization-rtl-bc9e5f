// Serializer: shifts coded parallel words out on one serial wire.
//
// A word is accepted with a valid/ready handshake and sent most significant bit
// first, one bit per clock. For the first word of a transaction the LANES
// indicator bits (one per byte lane, highest lane first) are sent in front of
// the word, and sof marks the first of them. While no word is waiting the link
// is idle: valid is low and the data wire keeps its last value, so idling costs
// no transitions.
//
// Timing: a word accepted in cycle k appears on the wire from cycle k+1. ready
// is high again in the last bit cycle of a word, so back-to-back words leave no
// gap: WORD_W cycles per word, plus LANES cycles at the start of a transaction.
// The MSB-first order follows the method's examples; the handshake, the framing
// strobes and the place of the indicator bits are this design's choices.
module bsc_serializer
  import bsc_pkg::*;
#(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned LANES  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [WORD_W-1:0] in_word,   // coded word
  input  logic              in_first,  // first word of a transaction
  input  logic [LANES-1:0]  in_ind,    // gray indicator bit per lane
  output bsc_ser_t          ser
);

  localparam int unsigned SH_W  = WORD_W + LANES;
  localparam int unsigned CNT_W = $clog2(SH_W + 1);

  logic [SH_W-1:0]  sh_q;
  logic [CNT_W-1:0] left_q;     // bits still to send, including the current one
  logic             sof_q;      // current bit is the first of a transaction
  logic             hold_q;     // last bit driven, kept while idle
  logic             busy;
  logic             load;

  assign busy     = (left_q != '0);
  assign in_ready = !busy || (left_q == CNT_W'(1));
  assign load     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh_q   <= '0;
      left_q <= '0;
      sof_q  <= 1'b0;
      hold_q <= 1'b0;
    end else begin
      if (busy) hold_q <= sh_q[SH_W-1];
      if (load) begin
        if (in_first) begin
          sh_q   <= {in_ind, in_word};
          left_q <= CNT_W'(SH_W);
        end else begin
          sh_q   <= {in_word, {LANES{1'b0}}};
          left_q <= CNT_W'(WORD_W);
        end
        sof_q <= in_first;
      end else if (busy) begin
        sh_q   <= sh_q << 1;
        left_q <= left_q - CNT_W'(1);
        sof_q  <= 1'b0;
      end
    end
  end

  always_comb begin
    ser.valid = busy;
    ser.sof   = busy && sof_q;
    ser.data  = busy ? sh_q[SH_W-1] : hold_q;
  end

endmodule
