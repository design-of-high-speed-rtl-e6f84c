// clock_gate: latch-based integrated clock gate used for the FSM-driven
// clock gating of the processor.
//
// A unit that is idle in the current controller state gets no clock edge at
// all, so its flip-flops do not toggle. The enable is captured by a latch that
// is transparent while clk is low and held while clk is high; the gated clock
// is clk AND the latched enable. Because the latch is closed during the high
// phase, an enable that changes right after a rising edge (as the controller
// outputs do) can neither shorten nor create a pulse: gclk either copies a whole
// high phase of clk or stays low for the whole cycle.
//
// Interface: clk (free-running), en (must be settled before the rising edge
// it is meant to pass), gclk (gated clock).
// Timing: the rising edge of clk at the end of a cycle in which en was high is
// passed on to gclk.
//
// Clock gating driven by the controller is the original design's technique; the
// latch-and-AND cell is the conventional way to build it and is this design's
// choice. The latch on en_latched is intended: it is what keeps the gated
// clock free of glitches, and lint tools report it as a latch.
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
