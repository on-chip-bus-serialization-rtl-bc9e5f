// Shared types of the low-power bus serialization codec.
//
// The codec turns a stream of parallel bus words into a serial bit stream whose
// transition count stays close to that of the parallel bus. Three coding steps
// are applied per byte lane: XOR with the previous word, inversion of every
// second word of a transaction, and a selective gray encoding of the first word.
//
// bsc_cfg_t switches the three steps on or off. Both ends of a link must use the
// same setting for xor_en and inv_en; the receiver learns the gray choice from
// the indicator bits on the wire, so gray_en matters only at the transmitter.
// The on/off switches follow the three coding levels the method is evaluated
// with (no coding, XOR only, all three steps); making them run-time inputs is a
// choice of this design.
//
// bsc_ser_t is the serial link: one data wire plus two framing strobes. valid
// marks a cycle that carries a bit, sof marks the first bit of a transaction
// (the first indicator bit). While valid is low the data wire holds its last
// value, so an idle link makes no transitions. The framing strobes are this
// design's choice of the guard signal a serial link needs for word boundaries.
package bsc_pkg;

  typedef struct packed {
    logic xor_en;   // step 2: XOR all but the first word with the previous word
    logic inv_en;   // step 3: invert the even-numbered words (t+1, t+3, ...)
    logic gray_en;  // step 4: gray-encode the first word when that helps
  } bsc_cfg_t;

  localparam bsc_cfg_t BSC_CFG_NONE     = '{xor_en: 1'b0, inv_en: 1'b0, gray_en: 1'b0};
  localparam bsc_cfg_t BSC_CFG_XOR      = '{xor_en: 1'b1, inv_en: 1'b0, gray_en: 1'b0};
  localparam bsc_cfg_t BSC_CFG_COMPLETE = '{xor_en: 1'b1, inv_en: 1'b1, gray_en: 1'b1};

  typedef struct packed {
    logic valid;    // this cycle carries a bit on data
    logic sof;      // first bit of a transaction (first indicator bit)
    logic data;     // the serial data wire
  } bsc_ser_t;

endpackage
