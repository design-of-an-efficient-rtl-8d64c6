// hcpm_pkg -- shared types and constants of the fully reused FM0/Manchester codec.
//
// The codec has no mode register: its coding mode is the value of four static
// control bits, SP (select of the positive-cycle multiplexer MUXB), SN (select of
// MUXC), and I1/I0 (the two data inputs of MUXD). This package names the four
// coding modes and gives the control-bit word for each. The codes are the
// published ones: FM0 encoding 1001, FM0 decoding 0010, Manchester encoding 0101,
// Manchester decoding 0011 (bit order SP SN I1 I0). Other codes are not coding
// modes; the hardware accepts them but its output then has no defined meaning.
package hcpm_pkg;

  typedef enum logic [1:0] {
    FM0_ENC = 2'd0,
    FM0_DEC = 2'd1,
    MAN_ENC = 2'd2,
    MAN_DEC = 2'd3
  } coding_e;

  // Control word in the order SP, SN, I1, I0.
  typedef struct packed {
    logic sp;
    logic sn;
    logic i1;
    logic i0;
  } mode_bits_t;

  localparam mode_bits_t MODE_FM0_ENC = '{sp: 1'b1, sn: 1'b0, i1: 1'b0, i0: 1'b1};
  localparam mode_bits_t MODE_FM0_DEC = '{sp: 1'b0, sn: 1'b0, i1: 1'b1, i0: 1'b0};
  localparam mode_bits_t MODE_MAN_ENC = '{sp: 1'b0, sn: 1'b1, i1: 1'b0, i0: 1'b1};
  localparam mode_bits_t MODE_MAN_DEC = '{sp: 1'b0, sn: 1'b0, i1: 1'b1, i0: 1'b1};

  function automatic mode_bits_t mode_bits(coding_e c);
    case (c)
      FM0_ENC: return MODE_FM0_ENC;
      FM0_DEC: return MODE_FM0_DEC;
      MAN_ENC: return MODE_MAN_ENC;
      default: return MODE_MAN_DEC;
    endcase
  endfunction

endpackage
