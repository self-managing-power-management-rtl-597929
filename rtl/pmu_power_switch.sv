// Behavioural model (not synthesizable logic): the power switches of the
// FSM transition logic and the supply they gate.
//
// The transition logic is built from gates with an integrated (fine-grained)
// header switch; all switches share the sleep signal. A switch is a
// transistor, not a logic function, so this model only reproduces what the
// rest of the circuit sees of it: while the virtual supply is down the gated
// logic's outputs float, which the model shows as a fresh random value on
// every change; while it is up the logic's function passes through
// unchanged. The supply drops as soon as sleep rises and comes up RAMP_NS
// after sleep falls. The original design's logic-level example switches
// instantly, which is the default of 0; a non-zero ramp must be covered by
// the sleep handler's WAKE_CYCLES.
//
// Interface: sleep in; vdd_on out (virtual supply present); logic_in is the
// value the gated logic computes when powered, logic_out what it really
// drives. Parameter WIDTH is the number of gated output nets.
module pmu_power_switch #(
  parameter int unsigned WIDTH   = 3,
  parameter int unsigned RAMP_NS = 0
) (
  input  logic             sleep,
  input  logic [WIDTH-1:0] logic_in,
  output logic             vdd_on,
  output logic [WIDTH-1:0] logic_out
);

  logic        vdd_ramp;
  int unsigned wake_id;   // numbers the wake-ups, so an aborted ramp is dropped

  initial begin
    vdd_ramp = 1'b0;
    wake_id  = 0;
  end

  always @(sleep) begin
    wake_id = wake_id + 1;
    if (sleep) begin
      vdd_ramp = 1'b0;
    end else if (RAMP_NS == 0) begin
      vdd_ramp = 1'b1;
    end else begin
      fork
        begin : ramp
          automatic int unsigned id = wake_id;
          #(RAMP_NS);
          if (id == wake_id && !sleep) vdd_ramp = 1'b1;
        end
      join_none
    end
  end

  assign vdd_on = vdd_ramp & ~sleep;

  always @(vdd_on or logic_in) begin
    if (!vdd_on) logic_out = WIDTH'($urandom);
    else         logic_out = logic_in;
  end

endmodule
