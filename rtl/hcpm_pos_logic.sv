// hcpm_pos_logic -- simplified positive-cycle logic of the codec (multiplexer MUXB).
//
// During the positive half cycle (CLK = 1) the codec outputs the inverse of this
// block's output p. The same p is reused in the negative half cycle as the select
// of MUXD, which is how one multiplexer serves both half cycles.
//   SP = 1 (FM0 encoding): p = Q, the reused flip-flop, so the first half of each
//          FM0 bit is the inverse of the second half of the previous bit.
//   SP = 0 (the other modes): p = the latch output, i.e. the codec input while
//          CLK = 1 and the input held from the first half while CLK = 0.
// The multiplexer and its SP select follow the published architecture; which
// signals feed its two data inputs is this design's reading of it, chosen so
// that all four coding modes work with the published control codes.
//
// Interface: sp, q_fb (reused flip-flop output), lat_q (latch output), p.
// Timing: purely combinational.
module hcpm_pos_logic (
  input  logic sp,
  input  logic q_fb,
  input  logic lat_q,
  output logic p
);

  always_comb p = sp ? q_fb : lat_q;

endmodule
