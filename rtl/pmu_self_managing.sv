// Self-managing power management unit for one power domain.
//
// A power-state FSM whose state flip-flops are the domain's control signals
// ({SW[1:0], ISO}, no output logic) so that they alone must stay powered to
// hold the controls. The combinational transition logic in front of them is
// power gated: a comparator checks the requested state against the current
// one and, while they are equal, puts the logic to sleep and stops the
// state clock through a latch-based clock gate. A request that differs wakes
// the logic and lets the state flip-flops be clocked until the state equals
// the request, after which the logic sleeps again.
//
// The domain has four requestable states (Off, Low voltage, Normal, High
// voltage) and one internal state, Isolation, through which every path into
// and out of Off passes, so that the domain's inputs and outputs are isolated
// before it is switched off and stay isolated until it is powered.
//
// Interface: clk (free running), rst_n (asynchronous, active low; resets to
// Off), req_state (Off 111, Low 100, Normal 010, High 000); state, sw, iso
// (controls of the managed domain) and sleep (transition logic powered down).
// Parameters: WAKE_CYCLES, clock cycles allowed for the transition logic to
// power up before the first state edge (0, as in the original design's example);
// RAMP_NS, power-up time of the behavioural power switch model (0). The
// design is correct when WAKE_CYCLES clock periods cover RAMP_NS.
// Timing: a direct transition completes on the (WAKE_CYCLES+1)-th rising
// clock edge after the request changes; a transition into or out of Off
// takes one edge more (via Isolation). Sleep is low from the clock low phase
// after the request changes until the low phase after the state reaches it.
// The power switches are a behavioural model; the rest is synthesizable.
module pmu_self_managing
  import pmu_pkg::*;
#(
  parameter int unsigned WAKE_CYCLES = 0,
  parameter int unsigned RAMP_NS     = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  pstate_e    req_state,
  output pstate_e    state,
  output logic [1:0] sw,
  output logic       iso,
  output logic       sleep
);

  logic    gclk;
  logic    vdd_on;
  pstate_e next_state;   // transition logic output if it were powered
  logic [2:0] next_state_sw; // what the (possibly unpowered) logic drives
  pctrl_t  ctrl;

  pmu_sleep_handler #(.WAKE_CYCLES(WAKE_CYCLES)) u_sleep (
    .clk       (clk),
    .rst_n     (rst_n),
    .cur_state (state),
    .req_state (req_state),
    .gclk      (gclk),
    .sleep     (sleep)
  );

  pmu_transition_logic u_trans (
    .cur_state  (state),
    .req_state  (req_state),
    .next_state (next_state)
  );

  pmu_power_switch #(.WIDTH(3), .RAMP_NS(RAMP_NS)) u_psw (
    .sleep     (sleep),
    .logic_in  (next_state),
    .vdd_on    (vdd_on),
    .logic_out (next_state_sw)
  );

  pmu_state_register u_state (
    .gclk  (gclk),
    .rst_n (rst_n),
    .d     (pstate_e'(next_state_sw)),
    .q     (state),
    .ctrl  (ctrl)
  );

  assign sw  = ctrl.sw;
  assign iso = ctrl.iso;

  // Only the four long-term states may be requested.
  a_req_legal: assert property (@(posedge clk) disable iff (!rst_n)
    is_request(req_state))
    else $error("illegal power state request %b", req_state);

  // The state flip-flops are only clocked while the transition logic is
  // powered.
  a_clock_only_when_powered: assert property (@(posedge gclk) disable iff (!rst_n)
    vdd_on)
    else $error("state clocked while transition logic is unpowered");

  // Off is entered only from Isolation, and left only to Isolation.
  a_off_via_iso: assert property (@(posedge clk) disable iff (!rst_n)
    (state == PS_OFF) && ($past(state) != PS_OFF) && $past(rst_n) |-> $past(state) == PS_ISO)
    else $error("Off entered without passing Isolation");

endmodule
