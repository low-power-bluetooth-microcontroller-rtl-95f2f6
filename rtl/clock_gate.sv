// Latch-based clock gate.
//
// A level-sensitive latch, transparent while clk is low, holds the enable;
// an AND gate combines the held enable with clk. Because the latch is closed
// while clk is high, a change of en during the high phase cannot cut or
// stretch a clock pulse: gclk only ever carries whole pulses of clk.
// en must be stable before the rising edge of clk, as it is when it comes
// from flip-flops on the same clock. The latch and AND structure is the one
// the design calls for; the module has no test-mode override, which the
// design does not mention. The latch reported by lint is this intended
// latch and stands.
//
// Ports: clk (free-running clock), en (gate enable, 1 = clock runs),
//        gclk (gated clock).
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;
endmodule
