// hcpm_neg_logic -- integrated negative-cycle logic of the codec.
//
// All four coding modes compute their negative-half-cycle (CLK = 0) value with
// one two-input parity gate, whose inputs are shaped by two multiplexers:
//   m  = SN ? I1 : X            (MUXC)
//   n  = p  ? I1 : I0           (MUXD, select reused from MUXB's output p)
//   nv = m ^ n
// With the published control codes this gives
//   FM0 encoding   (p = Q)       nv = X ^ ~Q
//   FM0 decoding   (p = A)       nv = X ^ A        (A = held first half-bit)
//   Manchester enc (p = X)       nv = ~X
//   Manchester dec               nv = ~X
// and the codec outputs ~nv during CLK = 0, which the reused flip-flop captures.
// The latch (EN = CLK) is transparent while CLK = 1 and holds the input's first
// half-bit A through the negative half cycle; it feeds MUXB.
//
// The component set (MUXC, MUXD, one parity gate, one latch enabled by CLK) is
// the published one. The published drawing names the gate XNOR; in the wiring
// chosen here the gate must compute XOR(m, n) (the same as XNOR with X inverted)
// for all four modes to be correct, and MUXC's second data input is I1. Both are
// this design's reading of the architecture.
//
// Interface: clk, x, sn, i1, i0, p (MUXB output); lat_q (latch output), nv.
// Timing: combinational except the level-sensitive latch. The latch is
// intentional: it is the 10-transistor latch of the published circuit, and it
// must close on the falling edge of CLK, before the input moves to the second
// half-bit.
module hcpm_neg_logic #(
  parameter int LAT_DELAY = 1
) (
  input  logic clk,
  input  logic x,
  input  logic sn,
  input  logic i1,
  input  logic i0,
  input  logic p,
  output logic lat_q,
  output logic nv
);

  logic m, n, lat_d;

  always_latch begin
    if (clk) lat_d = x;
  end

  // Propagation delay of the latch: when CLK rises, the reused flip-flop must
  // still see the half-bit the latch held through the negative cycle.
  assign #(LAT_DELAY) lat_q = lat_d;

  always_comb begin
    m  = sn ? i1 : x;
    n  = p ? i1 : i0;
    nv = m ^ n;
  end

endmodule
