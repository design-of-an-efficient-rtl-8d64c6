// tb_hcpm_neg_logic -- test of the integrated negative-cycle logic.
// Part 1: with clk = 1 (latch transparent) walks all 32 combinations of
// x, sn, i1, i0, p and checks nv against the intended equations
//   m = sn ? i1 : x,  n = p ? i1 : i0,  nv = m XOR n
// and that the latch output follows x.
// Part 2: checks that the latch holds the value x had when clk fell, while x
// changes during the low phase, and follows x again when clk rises.
// Values are read 3 time units after a change, past the latch's modelled
// propagation delay of 1 unit.
module tb_hcpm_neg_logic;
  logic clk, x, sn, i1, i0, p, lat_q, nv;
  int checks = 0, failures = 0;

  hcpm_neg_logic dut (.clk(clk), .x(x), .sn(sn), .i1(i1), .i0(i0), .p(p),
                      .lat_q(lat_q), .nv(nv));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (x=%0b sn=%0b i1=%0b i0=%0b p=%0b clk=%0b)",
               what, got, exp, x, sn, i1, i0, p, clk);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m, n, held;
    clk = 1'b1;
    for (int v = 0; v < 32; v++) begin
      {x, sn, i1, i0, p} = 5'(v);
      #3;
      m = sn ? i1 : x;
      n = p ? i1 : i0;
      check(nv, m ^ n, "nv");
      check(lat_q, x, "transparent latch");
    end
    sn = 1'b0; i1 = 1'b1; i0 = 1'b0; p = 1'b0;
    for (int k = 0; k < 50; k++) begin
      clk = 1'b1;
      x = logic'($urandom_range(0, 1));
      #3 check(lat_q, x, "latch follows while clk=1");
      held = x;
      clk = 1'b0;
      #1 x = ~held;
      #3 check(lat_q, held, "latch holds while clk=0");
      // With p = 0, nv = x XOR i0 = x: the gate sees the live input, not the latch.
      check(nv, ~held, "gate uses live input");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
