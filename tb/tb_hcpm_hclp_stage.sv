// tb_hcpm_hclp_stage -- exhaustive test of MUX1 + INVA: y must be the inverse of
// p while clk = 1 and the inverse of nv while clk = 0; y_neg must be the
// inverse of nv at all times.
module tb_hcpm_hclp_stage;
  logic clk, p, nv, y, y_neg;
  int checks = 0, failures = 0;

  hcpm_hclp_stage dut (.clk(clk), .p(p), .nv(nv), .y(y), .y_neg(y_neg));

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
        {clk, p, nv} = 3'(v);
        #1;
        exp = clk ? ~p : ~nv;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL clk=%0b p=%0b nv=%0b: y=%0b expected %0b", clk, p, nv, y, exp);
        end
        checks++;
        if (y_neg !== ~nv) begin
          failures++;
          $display("FAIL clk=%0b nv=%0b: y_neg=%0b", clk, nv, y_neg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
