// hcpm_reused_dff -- the one flip-flop of the codec, shared by all four modes.
//
// In FM0 encoding it holds the level of the second half of the previous code bit
// (the FM0 state); in FM0 and Manchester decoding it holds the decoded bit XD.
// It is a rising-edge D flip-flop with a clear input, as in the published
// architecture. Because its D input is the codec's half-cycle multiplexer output,
// the value it captures at a rising edge of CLK is the one presented during the
// negative (CLK = 0) half cycle that just ended.
//
// Interface: clk (CLK), clr (CLR), d, q.
// Timing: q takes d at each rising edge of clk. clr clears q to 0 at once and
// holds it there. Clear polarity (active high) and its asynchronous action are
// this design's choice; the published circuit only shows a CLR pin.
module hcpm_reused_dff (
  input  logic clk,
  input  logic clr,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= 1'b0;
    else     q <= d;
  end

endmodule
