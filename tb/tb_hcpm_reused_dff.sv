// tb_hcpm_reused_dff -- self-checking test of the codec's reused flip-flop.
// Drives random data for many clock periods, checks that q follows d one rising
// edge later, and that clr clears q immediately (between clock edges) and holds
// it at 0 across rising edges while asserted.
module tb_hcpm_reused_dff;
  logic clk = 1'b0, clr = 1'b1, d = 1'b0, q;
  int checks = 0, failures = 0;

  hcpm_reused_dff dut (.clk(clk), .clr(clr), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    #1 check(q, 1'b0, "q under clr");
    @(negedge clk);
    d = 1'b1;
    @(posedge clk); #1 check(q, 1'b0, "clr holds q across an edge");
    @(negedge clk) clr = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      exp = logic'($urandom_range(0, 1));
      d = exp;
      @(posedge clk); #1 check(q, exp, "q follows d");
    end
    // Asynchronous clear in the middle of a high phase.
    @(negedge clk) d = 1'b1;
    @(posedge clk); #1 check(q, 1'b1, "q set before clear");
    #1 clr = 1'b1;
    #1 check(q, 1'b0, "clear acts without a clock edge");
    #10 clr = 1'b0;
    @(negedge clk) d = 1'b1;
    @(posedge clk); #1 check(q, 1'b1, "q loads after clear released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
