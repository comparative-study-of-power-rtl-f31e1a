// Testbench of the clock gate: counts gated rising edges for enable patterns
// and checks that the gated clock never rises while the enable was low
// during the preceding low phase, and that an enable change in the high
// phase does not cut the current pulse short.
module tb_morph_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0, edges = 0;

  morph_clock_gate u_dut (.clk, .en, .gclk);

  always #5 clk = ~clk;
  always @(posedge gclk) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    en = 1'b0;
    repeat (5) @(negedge clk);
    check(edges == 0, "no edges while disabled");
    en = 1'b1;
    repeat (7) @(negedge clk);
    check(edges == 7, $sformatf("7 edges while enabled, got %0d", edges));
    // drop the enable in the middle of a high phase: that pulse must finish
    @(posedge clk); #2;
    check(gclk == 1'b1, "gated clock high with clk");
    en = 1'b0;
    #1;
    check(gclk == 1'b1, "pulse not cut short by enable change");
    edges = 0;
    repeat (6) @(negedge clk);
    check(edges == 0, "stopped after enable dropped");
    // enable raised in a high phase only takes effect after the low phase
    @(posedge clk); #2;
    en = 1'b1;
    #1;
    check(gclk == 1'b0, "no glitch when enable rises during high phase");
    @(negedge clk);
    repeat (3) @(negedge clk);
    check(edges == 3, $sformatf("restarted, got %0d", edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
