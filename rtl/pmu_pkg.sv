// Shared types of the self-managing power management unit.
//
// The power state of the managed domain is encoded so that the three state
// bits are the domain's control signals themselves, {SW[1:0], ISO}; no output
// decoding follows the state flip-flops. The encodings are those of the
// original design's control-signal table (Off SW=11 ISO=1, Isolation SW=10 ISO=1,
// Low SW=10 ISO=0, Normal SW=01 ISO=0, High SW=00 ISO=0). Isolation is an
// internal state that is never requested from outside.
package pmu_pkg;

  typedef enum logic [2:0] {
    PS_OFF    = 3'b111,
    PS_ISO    = 3'b101,
    PS_LOW    = 3'b100,
    PS_NORMAL = 3'b010,
    PS_HIGH   = 3'b000
  } pstate_e;

  // Control signals of the managed power domain, bit-identical to the state.
  typedef struct packed {
    logic [1:0] sw;   // power switch / supply level select
    logic       iso;  // isolation enable
  } pctrl_t;

  // A state that may be requested at the FSM input (Isolation may not).
  function automatic logic is_request(logic [2:0] s);
    return (s == PS_OFF) || (s == PS_LOW) || (s == PS_NORMAL) || (s == PS_HIGH);
  endfunction

endpackage
