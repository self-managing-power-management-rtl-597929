// Transition logic of the power-state FSM: the purely combinational
// next-state function. In the self-managing PMU this is the only part that
// is power gated; its output is sampled by the state flip-flops only on a
// gated clock edge, when the logic is powered.
//
// Next-state rule (the original design's transition table):
//   * Off with any non-Off request goes to Isolation first;
//   * an active state (Low, Normal, High) with an Off request goes to
//     Isolation first;
//   * Isolation goes straight to whatever is requested;
//   * every other request is taken directly, so any active state reaches any
//     other active state in one step.
// A request that is not a legal request (Isolation, or one of the three
// unused codes) leaves the state unchanged; the original design does not define
// these inputs, this is this design's choice.
//
// Interface: cur_state and req_state in, next_state out; no clock.
module pmu_transition_logic
  import pmu_pkg::*;
(
  input  pstate_e cur_state,
  input  pstate_e req_state,
  output pstate_e next_state
);

  always_comb begin
    next_state = cur_state;
    if (is_request(req_state)) begin
      unique case (cur_state)
        PS_OFF:
          next_state = (req_state == PS_OFF) ? PS_OFF : PS_ISO;
        PS_ISO:
          next_state = req_state;
        PS_LOW, PS_NORMAL, PS_HIGH:
          next_state = (req_state == PS_OFF) ? PS_ISO : req_state;
        default:
          next_state = cur_state;
      endcase
    end
  end

endmodule
