// tb_hcpm_codec -- end-to-end test of the FM0/Manchester codec at its default
// (and only) size.
//
// The testbench makes the bit clock itself: each bit period is 10 time units,
// clk high for the first 5 (first half-bit) and low for the last 5. Inputs
// change 1 unit after a clock edge, outputs are sampled 1 unit before the next.
// The sequence, with golden values computed here from the coding rules alone:
//   1. clear, FM0 encoding of random bits: each first half-bit must differ from
//      the previous second half-bit, and the two halves must differ exactly for
//      a 0. After clear the first bit starts high.
//   2. FM0 decoding of the code just produced (loop-back), then of a code of the
//      opposite polarity: xd must give back each bit exactly one clock later.
//   3. Manchester encoding: halves must be (~x, x).
//   4. Manchester decoding of that code: xd = bit, one clock later.
//   5. a clear at the start of a bit in the middle of FM0 encoding: that bit
//      must start high.
// It counts how often each mechanism happened (every mode, mode switches,
// clears, FM0 mid-bit transitions and their absence) and fails a mechanism
// that never occurred.
module tb_hcpm_codec;
  import hcpm_pkg::*;

  localparam int NBITS = 256;

  logic clk = 1'b1, clr = 1'b1, x = 1'b0;
  logic sp, sn, i1, i0;
  logic y, xd;
  int checks = 0, failures = 0;

  int n_fm0_enc = 0, n_fm0_dec = 0, n_man_enc = 0, n_man_dec = 0;
  int n_switch = 0, n_clear = 0, n_fm0_mid = 0, n_fm0_nomid = 0;
  coding_e cur_mode = FM0_ENC;

  logic bits   [NBITS];
  logic code_a [NBITS];
  logic code_b [NBITS];

  hcpm_codec dut (.clk(clk), .clr(clr), .sp(sp), .sn(sn), .i1(i1), .i0(i0),
                  .x(x), .y(y), .xd(xd));

  task automatic check(logic got, logic exp, string what, int idx);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s bit %0d: got %0b expected %0b at %0t", what, idx, got, exp, $time);
    end
  endtask

  task automatic set_mode(coding_e c);
    mode_bits_t mb = mode_bits(c);
    if (c != cur_mode) n_switch++;
    cur_mode = c;
    {sp, sn, i1, i0} = mb;
  endtask

  // One bit period, starting right after a rising edge (clk = 1). Returns the
  // output in each half and the xd value seen at the start of the period.
  task automatic bit_period(input logic xa, input logic xb,
                            output logic ya, output logic yb, output logic xd_start,
                            input logic do_clear = 1'b0);
    #1 xd_start = xd; x = xa;
    if (do_clear) begin
      clr = 1'b1;
      n_clear++;
    end
    #1 clr = 1'b0;
    #2 ya = y;
    #1 clk = 1'b0;
    #1 x = xb;
    #3 yb = y;
    #1 clk = 1'b1;
  endtask

  initial begin : watchdog
    #(10 * 20 * NBITS);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ya, yb, xs, prev_b, exp_a, exp_b;
    set_mode(FM0_ENC);
    #2 clr = 1'b0;
    n_clear++;
    check(xd, 1'b0, "xd after clear", -1);

    // 1. FM0 encoding.
    prev_b = 1'b0;  // state after clear: first bit starts high
    for (int i = 0; i < NBITS; i++) begin
      bits[i] = logic'($urandom_range(0, 1));
      bit_period(bits[i], bits[i], ya, yb, xs);
      exp_a = ~prev_b;
      exp_b = bits[i] ? exp_a : ~exp_a;
      check(ya, exp_a, "FM0 enc first half", i);
      check(yb, exp_b, "FM0 enc second half", i);
      if (ya != yb) n_fm0_mid++; else n_fm0_nomid++;
      code_a[i] = ya; code_b[i] = yb;
      prev_b = exp_b;
      n_fm0_enc++;
    end

    // 2. FM0 decoding, loop-back of the code just produced.
    set_mode(FM0_DEC);
    for (int i = 0; i <= NBITS; i++) begin
      if (i < NBITS) bit_period(code_a[i], code_b[i], ya, yb, xs);
      else           bit_period(1'b0, 1'b0, ya, yb, xs);
      if (i > 0) begin
        check(xs, bits[i-1], "FM0 dec loop-back", i - 1);
        n_fm0_dec++;
      end
    end
    // FM0 decoding of an independently built code with the other polarity.
    prev_b = 1'b0;
    for (int i = 0; i <= NBITS; i++) begin
      automatic logic b = logic'($urandom_range(0, 1));
      if (i < NBITS) begin
        bits[i] = b;
        exp_a = prev_b;            // boundary transition from the inverted start
        exp_a = (i == 0) ? 1'b0 : ~prev_b;
        exp_b = b ? exp_a : ~exp_a;
        prev_b = exp_b;
        bit_period(exp_a, exp_b, ya, yb, xs);
      end else begin
        bit_period(1'b1, 1'b1, ya, yb, xs);
      end
      if (i > 0) begin
        check(xs, bits[i-1], "FM0 dec inverted code", i - 1);
        n_fm0_dec++;
      end
    end

    // 3. Manchester encoding.
    set_mode(MAN_ENC);
    for (int i = 0; i < NBITS; i++) begin
      bits[i] = logic'($urandom_range(0, 1));
      bit_period(bits[i], bits[i], ya, yb, xs);
      check(ya, ~bits[i], "Manchester enc first half", i);
      check(yb, bits[i], "Manchester enc second half", i);
      code_a[i] = ya; code_b[i] = yb;
      n_man_enc++;
    end

    // 4. Manchester decoding, loop-back.
    set_mode(MAN_DEC);
    for (int i = 0; i <= NBITS; i++) begin
      if (i < NBITS) bit_period(code_a[i], code_b[i], ya, yb, xs);
      else           bit_period(1'b0, 1'b1, ya, yb, xs);
      if (i > 0) begin
        check(xs, bits[i-1], "Manchester dec loop-back", i - 1);
        n_man_dec++;
      end
    end

    // 5. Clear in the middle of FM0 encoding.
    set_mode(FM0_ENC);
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 0; i < 8; i++) begin
        bits[i] = logic'($urandom_range(0, 1));
        bit_period(bits[i], bits[i], ya, yb, xs);
        n_fm0_enc++;
      end
      // clear at the start of a bit: that bit must start high, whatever the
      // state was
      bit_period(1'b1, 1'b1, ya, yb, xs, 1'b1);
      check(ya, 1'b1, "first bit after clear starts high", rep);
      check(yb, 1'b1, "first bit after clear, data 1", rep);
      n_fm0_enc++;
      // the next bit must continue from the reloaded state: boundary change
      bit_period(1'b0, 1'b0, ya, yb, xs);
      check(xs, 1'b1, "state reloaded after the clear", rep);
      check(ya, 1'b0, "second bit after clear, boundary change", rep);
      check(yb, 1'b1, "second bit after clear, data 0", rep);
      n_fm0_enc++;
    end

    checks++;
    if (n_fm0_enc == 0 || n_fm0_dec == 0 || n_man_enc == 0 || n_man_dec == 0 ||
        n_switch < 4 || n_clear < 2 || n_fm0_mid == 0 || n_fm0_nomid == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: fm0_enc=%0d fm0_dec=%0d man_enc=%0d man_dec=%0d switches=%0d clears=%0d fm0_mid=%0d fm0_nomid=%0d",
             n_fm0_enc, n_fm0_dec, n_man_enc, n_man_dec, n_switch, n_clear, n_fm0_mid, n_fm0_nomid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
