// Latch-based clock gating cell.
//
// The enable is captured by a latch that is transparent while clk is low and
// closed while it is high; the gated clock is clk AND the latched enable.
// An enable that changes while clk is high therefore cannot cut or create a
// pulse: the gated clock only ever carries whole high phases of clk. This is
// the low-level latch plus AND gate the original design uses; the latch is the
// intended storage element of the cell, so the latch that lint tools report
// here is deliberate.
//
// Interface: clk, en in; gclk out, en_latched out (the latch output, which
// the sleep handler inverts to form the sleep signal).
// Timing: an enable present before clk rises passes that rising edge.
module pmu_clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk,
  output logic en_latched
);

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
