// Sleep and wake-up handler of the self-managing PMU.
//
// No extra state machine decides when the transition logic may sleep: a
// comparator checks the current power state against the requested one. When
// they are equal nothing needs to change, so the transition logic is powered
// down and the state clock is stopped; when they differ, the logic is woken
// and the state flip-flops are clocked until the state has reached the
// request (one edge for a direct transition, two when the route passes
// through Isolation). As in the original design, the comparator output is held by a
// latch that is transparent while clk is low, and the inverted latch output
// is the sleep signal; a latch-based clock gate passes clk to the state
// flip-flops.
//
// WAKE_CYCLES is the number of clock cycles the powered-up transition logic
// is given to settle before the first state edge. The original design allows
// a few cycles for this, depending on how the switches are built; its own
// example has none, which is the default. With WAKE_CYCLES = 0 the clock gate enable is
// the comparator output itself and the sleep latch and the clock gate latch
// hold the same value. Otherwise a small counter, cleared while asleep,
// holds the clock gate enable low for WAKE_CYCLES cycles after sleep falls.
// The counter and the two latches stay powered, like the state flip-flops.
//
// Interface: clk, rst_n (async, active low, clears the wake counter),
// cur_state, req_state in; gclk (state clock) and sleep out.
// Timing: sleep falls in the low phase of clk after the request differs from
// the state; the (WAKE_CYCLES+1)-th rising edge of clk after that passes to
// gclk, and every later one until the state equals the request.
// The latch is the intended storage element here; lint tools report it.
module pmu_sleep_handler
  import pmu_pkg::*;
#(
  parameter int unsigned WAKE_CYCLES = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pstate_e cur_state,
  input  pstate_e req_state,
  output logic    gclk,
  output logic    sleep
);

  logic differ;
  logic awake_l;
  logic ready;
  logic cg_en;

  assign differ = (cur_state != req_state);

  always_latch begin
    if (!clk) awake_l = differ;
  end

  assign sleep = ~awake_l;

  if (WAKE_CYCLES == 0) begin : g_no_wait
    assign ready = 1'b1;
  end else begin : g_wait
    localparam int unsigned CW = $clog2(WAKE_CYCLES + 1);
    logic [CW-1:0] wake_cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                            wake_cnt <= '0;
      else if (sleep)                        wake_cnt <= '0;
      else if (wake_cnt != CW'(WAKE_CYCLES)) wake_cnt <= wake_cnt + 1'b1;
    end
    assign ready = (wake_cnt == CW'(WAKE_CYCLES));
  end

  assign cg_en = differ & ready;

  pmu_clock_gate u_cg (
    .clk        (clk),
    .en         (cg_en),
    .gclk       (gclk),
    .en_latched ()
  );

endmodule
