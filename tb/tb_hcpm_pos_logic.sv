// tb_hcpm_pos_logic -- exhaustive test of the positive-cycle multiplexer MUXB:
// p must equal the flip-flop feedback when SP = 1 and the latch output when
// SP = 0, for all eight input combinations, several times over.
module tb_hcpm_pos_logic;
  logic sp, q_fb, lat_q, p;
  int checks = 0, failures = 0;

  hcpm_pos_logic dut (.sp(sp), .q_fb(q_fb), .lat_q(lat_q), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {sp, q_fb, lat_q} = 3'(v);
        #1;
        exp = (v >= 4) ? q_fb : lat_q;
        checks++;
        if (p !== exp) begin
          failures++;
          $display("FAIL sp=%0b q_fb=%0b lat_q=%0b: p=%0b expected %0b", sp, q_fb, lat_q, p, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
