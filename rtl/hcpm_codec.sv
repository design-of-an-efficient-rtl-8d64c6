// hcpm_codec -- fully reused FM0/Manchester codec built on the half-cycle
// processing model (HCPM).
//
// One small datapath does FM0 encoding, FM0 decoding, Manchester encoding and
// Manchester decoding, with every component active in every mode: a latch, four
// 2-to-1 multiplexers (MUX1, MUXB, MUXC, MUXD), one parity gate, one inverter
// and one flip-flop. Each bit period of CLK is split into a positive cycle
// (CLK = 1, first half-bit A) and a negative cycle (CLK = 0, second half-bit B):
//   hcpm_pos_logic  (MUXB)              value for the positive cycle
//   hcpm_neg_logic  (MUXC, MUXD, gate,  value for the negative cycle
//                    latch)
//   hcpm_hclp_stage (MUX1, INVA)        picks one by CLK and inverts it -> y
//   hcpm_reused_dff                     captures y's negative-half value at
//                                       each rising edge -> xd
//
// Mode control (SP SN I1 I0, see hcpm_pkg): FM0 enc 1001, FM0 dec 0010,
// Manchester enc 0101, Manchester dec 0011.
//
// Interface and timing (clk high in the first half of each bit):
//   Encoding: drive the bit on x for the whole period (change it after the
//     rising edge). y carries the first half-bit while clk = 1 and the second
//     while clk = 0. FM0: a level change at every bit boundary and, for a 0, in
//     mid-bit; after clr the first bit starts high. Manchester: y = x XOR clk,
//     i.e. first half ~x, second half x.
//   Decoding: drive the received half-bits on x, the first while clk = 1 and the
//     second while clk = 0, each changing just after a clock edge. The decoded
//     bit appears on xd at the rising edge that ends the bit and stays for one
//     period (latency one clock). FM0: xd = 1 when the two halves are equal.
//     Manchester: xd = second half-bit.
//   clr clears the flip-flop (asynchronous, active high: this design's choice).
// The component set, the control codes and the half-cycle partition follow the
// published architecture; the exact wiring of the multiplexer inputs and the
// gate polarity are this design's reading of it (see hcpm_neg_logic).
module hcpm_codec (
  input  logic clk,
  input  logic clr,
  input  logic sp,
  input  logic sn,
  input  logic i1,
  input  logic i0,
  input  logic x,
  output logic y,
  output logic xd
);

  logic q, lat_q, p, nv, y_neg;

  hcpm_pos_logic u_pos (
    .sp    (sp),
    .q_fb  (q),
    .lat_q (lat_q),
    .p     (p)
  );

  hcpm_neg_logic u_neg (
    .clk   (clk),
    .x     (x),
    .sn    (sn),
    .i1    (i1),
    .i0    (i0),
    .p     (p),
    .lat_q (lat_q),
    .nv    (nv)
  );

  hcpm_hclp_stage u_hclp (
    .clk (clk),
    .p   (p),
    .nv  (nv),
    .y     (y),
    .y_neg (y_neg)
  );

  hcpm_reused_dff u_dff (
    .clk (clk),
    .clr (clr),
    .d   (y_neg),
    .q   (q)
  );

  assign xd = q;

endmodule
