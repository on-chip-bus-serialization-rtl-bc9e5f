// Deserializer: rebuilds parallel words from the serial wire.
//
// A bit with sof starts a transaction: the first LANES bits are the gray
// indicator bits, then words of WORD_W bits follow, most significant bit first.
// Because every word has the same width, the receiver finds each word boundary
// by counting bits, and it knows which word is the first of the transaction.
// Bits that arrive before any sof are ignored; a sof in the middle of a word
// drops that word and starts a new transaction.
//
// Timing: out_valid is a one-cycle pulse in the cycle after the last bit of a
// word; out_ind holds the indicator bits of the current transaction. There is
// no backpressure: the consumer must take each word when it is presented.
module bsc_deserializer
  import bsc_pkg::*;
#(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned LANES  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bsc_ser_t          ser,
  output logic              out_valid,
  output logic [WORD_W-1:0] out_word,
  output logic              out_first,
  output logic [LANES-1:0]  out_ind
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_WORD} state_t;

  localparam int unsigned CNT_W = $clog2(WORD_W + LANES + 1);

  state_t           state_q;
  logic [CNT_W-1:0] cnt_q;       // bits received of the header or word
  logic [WORD_W-2:0] sh_q;       // bits of the word received so far
  logic             first_q;     // the word being received is the first one

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cnt_q     <= '0;
      sh_q      <= '0;
      first_q   <= 1'b0;
      out_valid <= 1'b0;
      out_word  <= '0;
      out_first <= 1'b0;
      out_ind   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (ser.valid) begin
        if (ser.sof) begin
          out_ind <= LANES'({out_ind, ser.data});
          first_q <= 1'b1;
          cnt_q   <= '0;
          state_q <= S_WORD;
          if (LANES > 1) begin
            cnt_q   <= CNT_W'(1);
            state_q <= S_HDR;
          end
        end else begin
          unique case (state_q)
            S_IDLE: ;
            S_HDR: begin
              out_ind <= LANES'({out_ind, ser.data});
              if (cnt_q == CNT_W'(LANES - 1)) begin
                cnt_q   <= '0;
                state_q <= S_WORD;
              end else begin
                cnt_q <= cnt_q + CNT_W'(1);
              end
            end
            S_WORD: begin
              sh_q <= (WORD_W-1)'({sh_q, ser.data});
              if (cnt_q == CNT_W'(WORD_W - 1)) begin
                cnt_q     <= '0;
                out_valid <= 1'b1;
                out_word  <= {sh_q, ser.data};
                out_first <= first_q;
                first_q   <= 1'b0;
              end else begin
                cnt_q <= cnt_q + CNT_W'(1);
              end
            end
            default: state_q <= S_IDLE;
          endcase
        end
      end
    end
  end

  a_sof_needs_valid: assert property (@(posedge clk) disable iff (!rst_n) ser.sof |-> ser.valid);

endmodule
