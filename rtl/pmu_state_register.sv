// State register of the self-managing power-state FSM.
//
// Three always-powered flip-flops hold the power state. Because the state is
// encoded as the control word {SW[1:0], ISO}, the register outputs drive the
// managed domain directly and keep doing so while the transition logic in
// front of them is powered down: the register is clocked only by the gated
// clock, so it never samples the (then floating) output of the unpowered
// logic. The asynchronous reset to Off (all controls in their safe value) is
// this design's choice; the original design does not describe reset.
//
// Interface: gclk (gated clock), rst_n (async, active low), d (next state),
// q (state) and ctrl (the same bits as a control struct).
// Timing: q takes d on each rising edge of gclk.
module pmu_state_register
  import pmu_pkg::*;
(
  input  logic    gclk,
  input  logic    rst_n,
  input  pstate_e d,
  output pstate_e q,
  output pctrl_t  ctrl
);

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= PS_OFF;
    else        q <= d;
  end

  assign ctrl = pctrl_t'(q);

endmodule
