// tb_hcpm_codec_rates -- the four coding modes at the bit periods of the three
// DSRC data rates.
//
// Time is counted in ns (1 time unit = 1 ns). For each rate, 500 kb/s (2000 ns
// per bit), 4 Mb/s (250 ns) and 27 Mb/s (37 ns, 18 ns high and 19 ns low), the
// test:
//   1. FM0-encodes the example pattern 0 1 1 0 right after a clear and compares
//      the eight half-bits with values worked out by hand from the FM0 rules:
//      10 11 00 10;
//   2. Manchester-encodes the same pattern, expecting 10 01 01 10 (x XOR clk);
//   3. decodes both hand-written codes back, one clock of latency;
//   4. runs 200 random bits through encoder and decoder in each code
//      (loop-back), checking every decoded bit.
// Inputs change 1 ns after a clock edge and outputs are read 1 ns before the
// next edge.
module tb_hcpm_codec_rates;
  import hcpm_pkg::*;

  localparam int NRAND = 200;

  logic clk = 1'b1, clr = 1'b1, x = 1'b0;
  logic sp, sn, i1, i0, y, xd;
  int checks = 0, failures = 0;
  int t_high = 1000, t_low = 1000;

  logic rb [NRAND];
  logic ca [NRAND];
  logic cb [NRAND];

  hcpm_codec dut (.clk(clk), .clr(clr), .sp(sp), .sn(sn), .i1(i1), .i0(i0),
                  .x(x), .y(y), .xd(xd));

  task automatic check(logic got, logic exp, string what, int idx);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s [%0d] period %0d ns: got %0b expected %0b", what, idx,
                 t_high + t_low, got, exp);
    end
  endtask

  task automatic set_mode(coding_e c);
    {sp, sn, i1, i0} = mode_bits(c);
  endtask

  // One bit period starting just after a rising edge, ending on the next one.
  task automatic bit_period(input logic xa, input logic xb, input logic do_clear,
                            output logic ya, output logic yb, output logic xd_start);
    #1 xd_start = xd; x = xa;
    if (do_clear) clr = 1'b1;
    #1 clr = 1'b0;
    #(t_high - 3) ya = y;
    #1 clk = 1'b0;
    #1 x = xb;
    #(t_low - 2) yb = y;
    #1 clk = 1'b1;
  endtask

  initial begin : watchdog
    #(3 * (2000 + 250 + 37) * (4 * NRAND + 40));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Example pattern and its hand-derived codes, first half then second half.
    static logic ex_x   [4] = '{1'b0, 1'b1, 1'b1, 1'b0};
    static logic fm0_a  [4] = '{1'b1, 1'b1, 1'b0, 1'b1};
    static logic fm0_b  [4] = '{1'b0, 1'b1, 1'b0, 1'b0};
    static logic man_a  [4] = '{1'b1, 1'b0, 1'b0, 1'b1};
    static logic man_b  [4] = '{1'b0, 1'b1, 1'b1, 1'b0};
    static int highs  [3] = '{1000, 125, 18};
    static int lows   [3] = '{1000, 125, 19};
    logic ya, yb, xs, prev_b;

    #2 clr = 1'b0;
    for (int r = 0; r < 3; r++) begin
      t_high = highs[r];
      t_low  = lows[r];

      // 1. FM0 encoding of the example, starting from a clear.
      set_mode(FM0_ENC);
      for (int i = 0; i < 4; i++) begin
        bit_period(ex_x[i], ex_x[i], i == 0, ya, yb, xs);
        check(ya, fm0_a[i], "FM0 example first half", i);
        check(yb, fm0_b[i], "FM0 example second half", i);
      end
      // 2. Manchester encoding of the example.
      set_mode(MAN_ENC);
      for (int i = 0; i < 4; i++) begin
        bit_period(ex_x[i], ex_x[i], 1'b0, ya, yb, xs);
        check(ya, man_a[i], "Manchester example first half", i);
        check(yb, man_b[i], "Manchester example second half", i);
      end
      // 3. Decoding the hand-written codes.
      set_mode(FM0_DEC);
      for (int i = 0; i <= 4; i++) begin
        if (i < 4) bit_period(fm0_a[i], fm0_b[i], 1'b0, ya, yb, xs);
        else       bit_period(1'b0, 1'b0, 1'b0, ya, yb, xs);
        if (i > 0) check(xs, ex_x[i-1], "FM0 example decoded", i - 1);
      end
      set_mode(MAN_DEC);
      for (int i = 0; i <= 4; i++) begin
        if (i < 4) bit_period(man_a[i], man_b[i], 1'b0, ya, yb, xs);
        else       bit_period(1'b0, 1'b1, 1'b0, ya, yb, xs);
        if (i > 0) check(xs, ex_x[i-1], "Manchester example decoded", i - 1);
      end

      // 4. Random loop-back in both codes.
      for (int code = 0; code < 2; code++) begin
        set_mode(code == 0 ? FM0_ENC : MAN_ENC);
        prev_b = 1'b0;
        for (int i = 0; i < NRAND; i++) begin
          rb[i] = logic'($urandom_range(0, 1));
          bit_period(rb[i], rb[i], i == 0, ya, yb, xs);
          if (code == 0) begin
            check(ya, ~prev_b, "FM0 random boundary", i);
            check(yb, rb[i] ? ya : ~ya, "FM0 random mid-bit", i);
            prev_b = yb;
          end else begin
            check(ya, ~rb[i], "Manchester random first half", i);
            check(yb, rb[i], "Manchester random second half", i);
          end
          ca[i] = ya;
          cb[i] = yb;
        end
        set_mode(code == 0 ? FM0_DEC : MAN_DEC);
        for (int i = 0; i <= NRAND; i++) begin
          if (i < NRAND) bit_period(ca[i], cb[i], 1'b0, ya, yb, xs);
          else           bit_period(1'b0, 1'b1, 1'b0, ya, yb, xs);
          if (i > 0) check(xs, rb[i-1], code == 0 ? "FM0 random decoded" : "Manchester random decoded", i - 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
