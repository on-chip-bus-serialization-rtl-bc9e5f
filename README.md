# Low-power serialization of an on-chip bus

Replacing a wide on-chip bus by a serial wire saves wires but usually costs
energy. A parallel bus that carries addresses `A, A+1, A+2, ...` or neighbouring
pixels toggles only a few of its lines per word. Shift the same words out one bit
at a time on a single wire, and most of that correlation is lost: the wire
toggles whenever two neighbouring bits differ, inside a word and across word
boundaries.

This RTL codes the bus words before they are serialized, so that the serial wire
makes about as few transitions as the parallel bus did. The receiver undoes the
coding exactly. The code has three steps. Each step is a row of XOR gates and
multiplexers, so a whole encoder or decoder is a few hundred gates and adds no
clock cycle of latency.

## The three coding steps

The words of one *transaction* are coded together. A transaction is a burst of
consecutive bus words, for example one macroblock row. Word `t` is the first word
of the transaction, then come `t+1`, `t+2`, and so on.

1. **XOR with the previous word.** Every word except the first is replaced by its
   bitwise XOR with the previous *original* word. Correlated words become mostly
   zeros, so the serial stream has few transitions.
2. **Invert every second word.** Words `t+1, t+3, ...` are inverted bit by bit.
   After step 1, a slowly changing stream tends to give words with zeros in the
   upper bits and ones in the lower bits. Sent MSB first, each such word ends in
   `1` and the next one starts with `0`, which costs one transition per word
   boundary. Inverting every other word removes that transition.
3. **Gray-code the first word when it helps.** The first word is sent either as
   it is or as its gray code, `B[n-1] = b[n-1]`, `B[i-1] = b[i] ^ b[i-1]`,
   whichever has fewer transitions between adjacent bits. Ties keep the binary
   word. One *indicator bit* per lane tells the receiver which form was sent.

All three steps are applied per **byte lane**. The 16-bit bus word is split into
two 8-bit lanes. Each lane has its own XOR history and its own gray decision. The
coded 16-bit word then goes out on one wire, upper byte first, MSB first.

### Worked example

These are five one-byte words `51h 52h 53h 54h 55h` on an 8-bit bus. Counts are
data-wire transitions over the 40 serial bits:

| coding        | words on the wire           | transitions |
|---------------|-----------------------------|-------------|
| parallel bus  | (8 lines)                   | 7           |
| none          | `51 52 53 54 55`            | 31          |
| XOR only      | `51 03 01 07 01`            | 13          |
| all three     | `79 FC 01 F8 01` (gray on)  | 7           |

The gray code of `51h` is `79h`, which cuts the first word from 5 transitions to
3. Inverting `03h` and `07h` gives `FCh` and `F8h`, which removes four
word-boundary transitions. `bsc_encoder_tb` checks these exact bit streams and
counts, with an 8-bit encoder.

## Decoding

The decoder runs the steps in reverse order. It gray-decodes the first word if
the lane's indicator bit is set. It re-inverts words `t+1, t+3, ...`. Then it XORs
each word after the first with the previously *restored* word. Because of that
last point, the decoder's history register is fed from its own output and not
from its input.

The gray decoder is **not** the gray encoder used a second time. The encoder
chain uses the input bit above (`b[i]`). The inverse uses the *decoded* bit above:
`b[i-1] = b[i] ^ B[i-1]`, which is a running XOR from the MSB down. Applying the
encoder twice does not give the word back (`51h -> 79h -> 45h`). So `bsc_gray_dec`
has the same chain shape as `bsc_gray_enc`, but each stage takes the bit above
from its own output.

A related detail: one might expect the selection to guarantee at most
`ceil(n/2)` transitions per first word. It does not. For 8 bits, the word `49h`
and its gray code `6Dh` both have 5 transitions, so 5 is the true worst case
(10 for 16 bits). The RTL implements the selection rule as stated, and the
testbench checks the true bound.

## Serial link format

A link is the struct `bsc_ser_t` (in `bsc_pkg`) with three bits:

| bit     | meaning |
|---------|---------|
| `data`  | the serial data wire, one bit per clock |
| `valid` | this cycle carries a bit |
| `sof`   | this bit is the first bit of a transaction |

A transaction on the wire looks like this:

```
sof   1 0 0 0 ... 0 0 ... 0
data  I1 I0 w0[15] ... w0[0] w1[15] ... w1[0] ...
      '---' '---------------' '---------------'
   indicator   first word       second word
   bits (lane 1, lane 0)
```

The receiver finds word boundaries by counting bits, because all words have the
same width. While `valid` is low the data wire keeps its last value, so an idle
link makes no transitions. Transition counts in this document refer to `data`
only. The strobes are control lines that change once per transaction or per
burst.

## Timing and interfaces

Everything runs on one clock, the serial bit clock.

* **Encoder input:** `in_valid` / `in_ready` handshake, plus `in_first` to mark
  the first word of a transaction. The first word after reset always counts as
  a first word. The coding is combinational between the handshake and the
  serializer's load register. A word accepted in cycle *k* is on the wire from
  cycle *k+1*.
* **Throughput:** `in_ready` rises again in the last bit cycle of a word, so a
  burst goes out without gaps: 16 cycles per word, plus 2 indicator cycles per
  transaction.
* **Decoder output:** `out_valid` is a one-cycle pulse in the cycle after the
  word's last bit, together with `out_data` and `out_first`. There is no
  backpressure; the consumer must take every word.
* **End-to-end latency:** a lone one-word transaction on an idle link is
  restored 18 clock edges after the edge that accepted it: 2 indicator bits plus
  16 data bits. The coding itself adds nothing.
* **Coding level:** `cfg` (`bsc_cfg_t`) holds `xor_en`, `inv_en` and `gray_en`.
  The package defines `BSC_CFG_NONE`, `BSC_CFG_XOR` and `BSC_CFG_COMPLETE`, the
  three levels the method is compared at. Normal use is `BSC_CFG_COMPLETE`. Both
  ends of a link must agree on `xor_en` and `inv_en`, and must change `cfg` only
  while the link is idle. The decoder does not need `gray_en`, because the
  indicator bits carry the choice.

## Module hierarchy

```
bsc_top                    two wrappers on a full-duplex pair + one back-bus link
├── bsc_wrapper  (x2)      codec of one bus wrapper
│   ├── bsc_encoder
│   │   ├── bsc_xor_enc   (per lane)  XOR with previous original word
│   │   ├── bsc_invert    (per lane)  invert words t+1, t+3, ...
│   │   ├── bsc_gray_enc  (per lane)  gray code + selection of the first word
│   │   └── bsc_serializer            shift register, indicator bits, framing
│   └── bsc_decoder
│       ├── bsc_deserializer          bit counting, first word, indicator bits
│       ├── bsc_gray_dec  (per lane)
│       ├── bsc_invert    (per lane)
│       └── bsc_xor_dec   (per lane)  XOR with previous restored word
├── bsc_encoder            back-bus transmitter (one-way traffic)
└── bsc_decoder            back-bus receiver
bsc_pkg                    bsc_cfg_t, bsc_ser_t, the three coding levels
```

The intended system is an SoC whose shared bus (a 16-bit AMBA AHB in the
reference system, an MPEG-4 codec chip) is replaced by serial wires. Every bus
wrapper gets an encoder for its outgoing wire and a decoder for its incoming
wire. The point-to-point back-buses between accelerators use a single one-way
wire. `bsc_top` builds one of each kind of link. Its parallel ports stand in for
the modules on either side, and its serial links are outputs so that their
activity can be measured.

Parameters: `WORD_W` (bus width, default 16) and `CODE_W` (lane width, default
8). `WORD_W` must be a multiple of `CODE_W`. The testbenches also use
`WORD_W = CODE_W = 8`.

## What is not here

This RTL covers only the serialization codec. It leaves out:

* the processor, the DMA/SDRAM controller and the MPEG-4 accelerators;
* the AHB protocol logic of the wrappers, including which AHB signals (address,
  control, write data, read data) share a serial wire;
* the physical transceiver cells.

The serializer and deserializer are plain shift registers on the bit clock. A
real chip would use dedicated high-speed serdes cells behind a slower bus clock.

## Choices made in this design

These points are not fixed by the method. This implementation chose them:

* The framing strobes `valid` and `sof`, with the indicator bits sent in front of
  the first word. The other option is a separate guard line.
* Per-lane coding history and per-lane gray decision for the 16-bit bus. The
  lanes are sent upper byte first.
* The valid/ready handshake on the encoder, and no backpressure at the decoder.
* Synchronous active-low reset that clears the histories to zero. The reset
  value is never used for coding, because a transaction always starts with a
  first word.
* Combinational coding with no pipeline stage. This matches the method's claim
  of zero added latency.
* Run-time enables for the three steps.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog.
`tb/bsc_ref_pkg.sv` is a separate reference model of the code. It builds
expected serial frames from the coding rules directly, not from the RTL
structure.

| testbench | what it shows |
|---|---|
| `bsc_invert_tb`, `bsc_gray_enc_tb`, `bsc_gray_dec_tb` | all 8-bit inputs; gray selection rule and the true worst-case bound |
| `bsc_xor_enc_tb`, `bsc_xor_dec_tb` | the worked example, then random transactions |
| `bsc_serializer_tb`, `bsc_deserializer_tb` | bit order, framing, idle hold, burst of 4 words in exactly 66 bit cycles, one-cycle output latency |
| `bsc_encoder_tb` | the 31 / 13 / 7 example streams, and the 16-bit encoder bit-exact against the reference under every coding level |
| `bsc_decoder_tb`, `bsc_wrapper_tb` | reference-coded frames and loopback, every coding level, random gaps |
| `bsc_top_tb` | all three links at default size and at once; counts gray chosen and not chosen, inverted words, stalls, idle, full-duplex overlap and level changes |
| `bsc_traffic_tb` | transition counts for image, address and random traffic at the three coding levels, against a parallel bus |

To run one with plain Verilator from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/bsc_pkg.sv tb/bsc_ref_pkg.sv tb/bsc_top_tb.sv --top-module bsc_top_tb
./obj_dir/Vbsc_top_tb
```

`bsc_traffic_tb` gives these counts (data-wire transitions relative to a 16-bit
parallel bus carrying the same words):

| traffic | no coding | XOR only | all three |
|---|---|---|---|
| synthetic image pixels | 2.05 | 1.10 | 1.07 |
| addresses `A, A+1, ...` | 2.91 | 1.02 | 0.65 |
| random (entropy-coded-like) | 1.00 | 1.01 | 1.00 |

Compare the published evaluation, which ran real MPEG-4 traffic at the
module-wrapper level. There, uncoded serialization cost about 3 to 4 times the
parallel-bus transitions, XOR coding cut that by about 30 %, and all three steps
cut it by about 50 %. Image traffic gained the most and entropy-coded traffic the
least. The synthetic traffic here shows the same order of benefit. The absolute
ratios differ because the traffic differs. The reported codec cost was about
1,800 gates per encoder/decoder on average (23k gates for all wrappers of the
chip). Coarse synthesis of this RTL gives about 90 word-level cells and 43
flip-flop bits for the 16-bit encoder, and 86 cells and 61 flip-flop bits for the
decoder.

Limits of the checks: the code has only been simulated and never run on a real
SoC trace. No checks cover timing at a real serial clock rate or the interaction
with AHB transfers.
