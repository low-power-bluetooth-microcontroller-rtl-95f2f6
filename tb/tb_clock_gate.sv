// Self-checking testbench for the latch-based clock gate.
// The enable is changed at random both in the low and in the high phase of
// the clock. For every rising clock edge the gated clock must pulse exactly
// when the enable was 1 at that edge; every gated pulse must start and end
// with a clock edge (no glitch, no shortened pulse) even when the enable
// falls or rises in the middle of the high phase.
`timescale 1ns/1ps
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  always #5 clk = ~clk;

  clock_gate dut (.clk, .en, .gclk);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  int   pulses = 0, expected = 0, high_changes = 0;
  logic en_at_edge = 1'b0;
  realtime t_rise;

  always @(posedge gclk) begin
    pulses++;
    t_rise = $realtime;
    check(clk == 1'b1, "gated pulse starts with the clock");
    check(en_at_edge == 1'b1, "pulse only when enabled at the edge");
  end
  always @(negedge gclk) if (pulses > 0) begin
    check(clk == 1'b0, "gated pulse ends with the clock");
    check($realtime - t_rise == 5.0, "full-width pulse");
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      #2;                       // low phase
      en = 1'($urandom_range(0, 1));
      en_at_edge = en;
      if (en) expected++;
      #5;                       // high phase: must not glitch
      if ($urandom_range(0, 1)) begin en = ~en; high_changes++; end
      #3;
    end
    check(pulses == expected, $sformatf("%0d gated pulses, exp %0d", pulses, expected));
    check(high_changes > 0 && expected > 0 && expected < 400, "stimulus covered both levels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
