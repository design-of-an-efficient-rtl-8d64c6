// hcpm_hclp_stage -- half-cycle logic partition: multiplexer MUX1 and inverter INVA.
//
// The codec works in half cycles of its bit clock. While CLK = 1 (the first half
// of a bit, the positive cycle) MUX1 passes the positive-cycle value p; while
// CLK = 0 (the second half, the negative cycle) it passes the negative-cycle
// value nv. INVA inverts the result. The inverter output y is the encoded output
// (YFE in FM0 encoding, YME in Manchester encoding) and also the D input of the
// reused flip-flop, which therefore stores the second-half level of each bit.
// This structure is the published one.
//
// y_neg is the value y takes during the negative half cycle (~nv). The reused
// flip-flop is fed from it: at a rising edge of CLK the flip-flop captures what
// y showed in the half cycle that just ended, which is y_neg. In silicon both
// are the same INVA net (the flop's hold time covers the select change); in a
// zero-delay simulation, feeding the flop from y would race the clock edge
// against MUX1's select, which is also CLK. The tap is this design's choice; a
// generic synthesis gives it an inverter of its own, where the published
// circuit has the single INVA.
//
// Interface: clk (MUX1 select), p, nv; y (encoded output), y_neg (flop D).
// Timing: combinational; the clock is used here as data, so y changes at both
// clock edges.
module hcpm_hclp_stage (
  input  logic clk,
  input  logic p,
  input  logic nv,
  output logic y,
  output logic y_neg
);

  always_comb begin
    y     = ~(clk ? p : nv);
    y_neg = ~nv;
  end

endmodule
