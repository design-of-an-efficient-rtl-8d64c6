# Fully reused FM0/Manchester codec (half-cycle processing model)

Short-range vehicle radios (DSRC: toll collection, car-to-roadside and
car-to-car links) line-code their bit stream with FM0 or Manchester coding, so
that the transmitted waveform has no DC component and carries its own clock.
A node talks half-duplex, so at any moment it needs exactly one of four
functions: FM0 encoding, FM0 decoding, Manchester encoding or Manchester
decoding.

This codec does all four with one tiny datapath in which **every component
works in every mode**. It has one flip-flop, one latch, four 2-to-1
multiplexers, one two-input parity gate and one inverter. The trick is to cut
each bit period into its two halves. The *positive cycle* is `clk = 1`, the
first half-bit. The *negative cycle* is `clk = 0`, the second half-bit. Each
coding function is then rewritten so that its two halves come from the same
few gates:

* **Half-cycle partition.** A multiplexer driven by the clock itself (MUX1)
  selects the positive-cycle value in the first half and the negative-cycle
  value in the second.
* **Reused flip-flop.** One flip-flop after that multiplexer holds the FM0
  state when encoding and the decoded bit when decoding.
* **Reshaped logic.** The negative-cycle function of every mode is rewritten
  as one parity gate whose inputs are set by multiplexers. The positive-cycle
  logic shrinks to a single multiplexer (MUXB), whose output is reused as a
  select in the negative cycle.

The mode is set by four static control bits, not by a state machine.

## The two line codes

Each bit period is split into a first half **A** (`clk = 1`) and a second half
**B** (`clk = 0`).

**FM0**
- The level always changes at a bit boundary: A(t) = not B(t-1).
- A **0** also changes level in mid-bit: B = not A.
- A **1** keeps its level through the bit: B = A.

A decoder therefore only compares the two halves of a bit: equal halves mean 1.
The code's absolute polarity carries no information.

**Manchester** (as built here): y = x XOR clk.
- First half = not x, second half = x.
- A 0 is therefore high-then-low, and a 1 is low-then-high.
- The decoder returns the second half-bit.

## Datapath

```
                 +------------------- q (xd) ---------------------+
                 |                                                 |
 x ---+--[latch, open while clk=1]-- L                             |
      |                             |                              |
      |            MUXB:  p = SP ? q : L     (positive-cycle logic)|
      |                             |                              |
      |            MUXD:  n = p ? I1 : I0    (select reused from p)|
      +----------- MUXC:  m = SN ? I1 : x                          |
                          nv = m XOR n       (negative-cycle logic)|
                                                                   |
            MUX1 + INVA:  y = not (clk ? p : nv)  ---> y (YFE/YME) |
                          flip-flop D = not nv, rising clk  -------+
```

Table 1 shows what the same gates compute in each mode. Q is the
flip-flop, L the latch and x the input. In decoding, x carries A during the
first half and B during the second.

| mode (SP SN I1 I0) | p (MUXB) | n (MUXD) | m (MUXC) | first half y = not p | second half y = not nv | flip-flop takes |
|---|---|---|---|---|---|---|
| FM0 encode 1 0 0 1 | Q | not Q | x | not Q | x XOR Q | second half: the FM0 state |
| FM0 decode 0 0 1 0 | L = A | A | x = B | – | A XNOR B | A XNOR B = decoded bit |
| Manchester encode 0 1 0 1 | L = x | not x | I1 = 0 | not x | x | (unused) |
| Manchester decode 0 0 1 1 | L = A | 1 | x = B | – | B | B = decoded bit |

Table 1: function of each gate per mode.

How each mode works:

* **FM0 encode.** The flip-flop always holds the previous second half-bit, so
  the first half is its inverse and the boundary change comes for free. The
  second half is x XOR Q, which works out to B = A for x = 1 and B = not A
  for x = 0.
* **FM0 decode.** The latch keeps the first half-bit through the negative
  cycle. MUXD passes it on as n, because I1 = 1 and I0 = 0 make MUXD a buffer
  of its select. The parity gate then compares it with the live second half.
* **Manchester encode and decode.** The latch is transparent whenever it
  matters, so p is simply x in the first half. MUXD and MUXC turn the parity
  gate into an inverter (encode) or a buffer (decode) of x.

## Control codes

`hcpm_pkg` names the modes (`FM0_ENC`, `FM0_DEC`, `MAN_ENC`, `MAN_DEC`). Its
function `mode_bits()` returns the `{sp, sn, i1, i0}` word for each:
1001, 0010, 0101 and 0011. The other twelve codes are not modes, and the
output is then meaningless. The control bits should change only while the
codec is idle or cleared.

## Interface and timing

| port | dir | meaning |
|---|---|---|
| `clk` | in | bit clock, one period per bit; high = first half |
| `clr` | in | clears the flip-flop to 0, asynchronous, active high |
| `sp sn i1 i0` | in | mode code |
| `x` | in | bit to encode, or received half-bits to decode |
| `y` | out | FM0 or Manchester code, two values per bit |
| `xd` | out | decoded bit |

**Encoding.** Hold the bit on `x` for the whole period, changing it just after
a rising edge. `y` gives the first half-bit while `clk` is high and the second
while it is low. It is combinational from `x` and the flip-flop, so it has no
latency. After `clr`, the flip-flop is 0 and the first FM0 bit starts high.

**Decoding.** Present the first half-bit while `clk` is high and the second
while it is low, each changing just after a clock edge. The latch closes on
the falling edge. The decoded bit appears on `xd` at the rising edge that ends
the coded bit and stays one full period: latency one clock, one bit per clock.

One bit per clock means a 0.5, 4 or 27 MHz clock for the 500 kb/s, 4 Mb/s and
27 Mb/s DSRC rates. The longest half-cycle path is a few gate delays: latch,
three multiplexers, the gate, an inverter. Those rates are therefore very
likely easy to meet, but no timing analysis was done.

## Simulating a circuit that uses its clock as data

`clk` is both the flip-flop's clock and a data signal: it selects MUX1 and
enables the latch. In silicon this works because the flop's hold time is
shorter than the delay of the select and the latch. A zero-delay simulator
has no such delays, so two places are modelled explicitly.

* **Flip-flop input.** The flop is fed from `y_neg = not nv`. This is the
  value `y` shows during the low half that ends at the capturing edge. If the
  flop were fed from `y` itself, the simulator could sample `y` after MUX1
  has already switched to the first half of the next bit.
* **Latch delay.** The latch output has a delay of `LAT_DELAY` time units
  (default 1; synthesis ignores it). When `clk` rises, the flop must still
  see the half-bit the latch held, not the value the now-open latch passes
  through.

The tests depend on both. Without them, FM0 encoding and FM0 decoding fail in
Verilator. Testbenches must change the codec's inputs away from clock edges,
as the included ones do (1 time unit after an edge).

## Relation to the published architecture

The following follow the published design:

* the component set (one flip-flop, one latch, four multiplexers, one parity
  gate, one inverter);
* the names and roles of MUX1, MUXB, MUXC, MUXD and INVA;
* the four control codes;
* the latch enabled by the clock;
* MUXD's select being taken from MUXB's output.

The following are readings or choices of this implementation:

* **Multiplexer inputs.** Which signal feeds each multiplexer data input was
  reconstructed. The wiring above is the only assignment found, among
  the signals available to the named parts, that makes all four published
  control codes give correct codes without an extra gate. It reproduces the published single-mode FM0 encoder and decoder
  exactly: first half not Q and second half x XOR Q, and the decoder compares
  the latched half with the live one. It also matches the XOR-with-clock
  Manchester codec.
* **Gate polarity.** The published description names the shared gate an
  XNOR. With this wiring it must compute XOR(m, n), which is the same as an
  XNOR with x inverted.
* **Manchester polarity.** The published equation is x XOR clk, while a
  remark elsewhere says a 0 gives a rising mid-bit edge. With `clk` high first
  those disagree. This design follows the XOR.
* **Clear.** The clear's polarity and its asynchronous action are this
  design's choice.
* **Extra inverter.** `y_neg` and `LAT_DELAY` (previous section) are
  additions. A generic synthesis turns `y_neg` into a second inverter.
* **Register count.** A reported FPGA mapping used 3 slice registers.
  Synthesis of this RTL gives 1 flip-flop and 1 latch: 11 cells in all.
* **Other codes.** Unused control codes are left undefined.

The rest of a DSRC transceiver is not part of this RTL: the RF front-end,
the microprocessor that chooses the mode, modulation, error correction and the
clock recovery that would supply `clk`. The codec's ports are where they
connect.

## Modules

| file | contents |
|---|---|
| `rtl/hcpm_pkg.sv` | mode enum, control-word struct, `mode_bits()` |
| `rtl/hcpm_pos_logic.sv` | MUXB |
| `rtl/hcpm_neg_logic.sv` | latch, MUXC, MUXD, parity gate; parameter `LAT_DELAY` |
| `rtl/hcpm_hclp_stage.sv` | MUX1 and INVA, plus the `y_neg` tap |
| `rtl/hcpm_reused_dff.sv` | the flip-flop with clear |
| `rtl/hcpm_codec.sv` | top level, the nine ports above |

## Tests

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

* **`tb_hcpm_codec`** is the end-to-end test, and the codec has no size
  parameters. It runs 256 random bits through each mode. It loops the FM0 and
  Manchester codes it produced back into the decoders. It also decodes an
  independently built FM0 code of the opposite polarity, and applies clears in
  the middle of FM0 encoding. Golden values come from the coding rules alone.
  Decoded bits are checked at exactly one clock of latency. It counts every
  mechanism (each mode, mode switches, clears, FM0 bits with and without a
  mid-bit change) and fails if one never happened.
* **Unit tests.** `tb_hcpm_pos_logic`, `tb_hcpm_neg_logic`,
  `tb_hcpm_hclp_stage` and `tb_hcpm_reused_dff` test one module each,
  exhaustively where the module is combinational. They also check that the
  latch holds and that the clear acts without a clock edge.

* **`tb_hcpm_codec_rates`** runs the codec at the bit periods of the three
  DSRC rates: 2000, 250 and 37 ns, with 1 time unit taken as 1 ns. At each
  rate it encodes the pattern 0 1 1 0 and compares the result with codes
  worked out by hand. For FM0 after a clear these are 10 11 00 10; for
  Manchester, 10 01 01 10. It decodes both codes back, then runs 200 random
  bits through each code in loop-back.

Run a test with plain Verilator, for example:

```
verilator --binary --timing --assert -y rtl rtl/hcpm_pkg.sv \
          tb/tb_hcpm_codec.sv --top-module tb_hcpm_codec
./obj_dir/Vtb_hcpm_codec
```

(`-y rtl` lets Verilator find each module in `rtl/<name>.sv`; the package is
named first because it is imported, not instantiated.) A unit test runs the
same way with its own testbench and top module, e.g.

```
verilator --binary --timing --assert -y rtl tb/tb_hcpm_neg_logic.sv --top-module tb_hcpm_neg_logic
```
