// End-to-end self-checking testbench of the self-managing PMU.
//
// A cycle-level reference model (the transition table written out row by
// row) predicts the power state after every clock edge; the testbench checks
// the state and the SW/ISO controls each cycle, that the transition logic
// sleeps exactly when the state equals the request, how many cycles each
// transition takes (one when direct, two through Isolation), and that the
// state holds while the powered-down transition logic drives floating
// values. A directed part makes all twelve transitions between the four
// long-term states, each followed by an idle period; a random part changes
// requests, sometimes while a transition through Isolation is under way;
// a reset during operation ends the run. Every mechanism is counted and one
// that never happened counts as a failure.
//
// This variant gives the power switch model a 25 ns power-up ramp and the
// PMU a wake-up wait of three 10 ns clock cycles, which covers it: every
// transition then starts three cycles later, and the PMU's own assertion
// checks that the state is never clocked while the logic is unpowered.
module tb_pmu_self_managing_wake;
  import pmu_pkg::*;

  localparam int unsigned W = 3;   // the PMU's WAKE_CYCLES

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  pstate_e    req;
  pstate_e    state;
  logic [1:0] sw;
  logic       iso;
  logic       sleep;

  int checks = 0, failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_idle_periods = 0;     // sleep held for at least 4 cycles
  int n_wakeups = 0;          // sleep 1 -> 0
  int n_direct = 0;           // one-edge transitions between active states
  int n_via_iso_off = 0;      // active -> Isolation -> Off
  int n_via_iso_on = 0;       // Off -> Isolation -> active
  int n_redirect = 0;         // request changed while in Isolation
  int n_float_held = 0;       // cycles the gated logic floated, state held
  int n_reset = 0;            // reset during operation
  int n_waited = 0;           // cycles a woken logic was given to power up
  int pair_seen[5][5];        // completed transitions between requestable states

  pmu_self_managing #(.WAKE_CYCLES(W), .RAMP_NS(25)) dut (
    .clk(clk), .rst_n(rst_n), .req_state(req),
    .state(state), .sw(sw), .iso(iso), .sleep(sleep)
  );

  always #5 clk = ~clk;   // rising edges at 10k+5

  function automatic logic [2:0] ref_next(logic [2:0] c, logic [2:0] r);
    case ({c, r})
      {3'b111, 3'b111}: return 3'b111;
      {3'b111, 3'b100}: return 3'b101;
      {3'b111, 3'b010}: return 3'b101;
      {3'b111, 3'b000}: return 3'b101;
      {3'b101, 3'b111}: return 3'b111;
      {3'b101, 3'b100}: return 3'b100;
      {3'b101, 3'b010}: return 3'b010;
      {3'b101, 3'b000}: return 3'b000;
      {3'b100, 3'b111}: return 3'b101;
      {3'b100, 3'b100}: return 3'b100;
      {3'b100, 3'b010}: return 3'b010;
      {3'b100, 3'b000}: return 3'b000;
      {3'b010, 3'b111}: return 3'b101;
      {3'b010, 3'b100}: return 3'b100;
      {3'b010, 3'b010}: return 3'b010;
      {3'b010, 3'b000}: return 3'b000;
      {3'b000, 3'b111}: return 3'b101;
      {3'b000, 3'b100}: return 3'b100;
      {3'b000, 3'b010}: return 3'b010;
      {3'b000, 3'b000}: return 3'b000;
      default:          return c;
    endcase
  endfunction

  function automatic int idx(logic [2:0] s);
    case (s)
      3'b111:  return 0;
      3'b100:  return 1;
      3'b010:  return 2;
      3'b000:  return 3;
      default: return 4;
    endcase
  endfunction

  function automatic bit is_active(logic [2:0] s);
    return (s == 3'b100) || (s == 3'b010) || (s == 3'b000);
  endfunction

  logic [2:0] exp_state;
  logic       prev_sleep;
  int         sleep_run;
  int         cnt;            // reference wake counter

  task automatic fail(string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  // One clock cycle. The request is set in the high phase just after a
  // rising edge; checks are made in the low phase that follows, then the
  // reference model steps over the next rising edge.
  task automatic run_cycle(pstate_e r);
    logic [2:0] prev_st;
    req = r;
    #5;                                      // low phase
    cycle++;
    checks++;
    if (state !== pstate_e'(exp_state))
      fail($sformatf("state %b expected %b", state, exp_state));
    checks++;
    if ({sw, iso} !== exp_state)
      fail($sformatf("controls sw=%b iso=%b expected %b", sw, iso, exp_state));
    checks++;
    if (sleep !== (exp_state == 3'(req)))
      fail($sformatf("sleep=%b with state %b request %b", sleep, exp_state, req));
    if (sleep && dut.next_state_sw != dut.next_state) n_float_held++;
    if (prev_sleep && !sleep) n_wakeups++;
    if (sleep) sleep_run++;
    else begin
      if (sleep_run >= 4) n_idle_periods++;
      sleep_run = 0;
    end
    prev_sleep = sleep;
    #5;                                      // just after the rising edge
    prev_st = exp_state;
    if (exp_state != 3'(req) && cnt == int'(W)) exp_state = ref_next(exp_state, 3'(req));
    else if (exp_state != 3'(req)) n_waited++;
    cnt = (prev_st == 3'(req)) ? 0 : ((cnt < int'(W)) ? cnt + 1 : cnt);
    if (is_active(prev_st) && is_active(exp_state) && prev_st != exp_state) n_direct++;
    if (prev_st == 3'b101 && exp_state == 3'b111) n_via_iso_off++;
    if (prev_st == 3'b101 && is_active(exp_state)) n_via_iso_on++;
  endtask

  // Request a state from a settled state and check the transition latency.
  task automatic request(pstate_e r, int idle);
    logic [2:0] from;
    int         lat, want;
    from = exp_state;
    want = (from == r) ? 0 : (from == 3'b101) ? 1 : ((from == 3'b111 || r == PS_OFF) ? 2 : 1);
    if (from != r) want += int'(W) - cnt;
    lat = 0;
    while (exp_state != 3'(r) && lat < 10 + int'(W)) begin
      run_cycle(r);
      lat++;
    end
    checks++;
    if (lat != want) fail($sformatf("transition %b->%b took %0d cycles, expected %0d", from, r, lat, want));
    if (from != r && idx(from) < 4) pair_seen[idx(from)][idx(r)]++;
    repeat (idle) run_cycle(r);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static pstate_e reqs[4] = '{PS_OFF, PS_LOW, PS_NORMAL, PS_HIGH};
    int missing;
    foreach (pair_seen[i, j]) pair_seen[i][j] = 0;
    prev_sleep = 1'b1;
    sleep_run = 0;
    cnt = 0;
    req = PS_OFF;
    exp_state = 3'b111;
    #3;
    rst_n = 1'b0;
    #13;                                     // t = 16: high phase, after edge
    rst_n = 1'b1;
    checks++;
    if (state !== PS_OFF) fail("reset state is not Off");

    // Directed: every ordered pair of the four long-term states.
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        if (a == b) continue;
        request(reqs[a], 6);
        request(reqs[b], 6);
      end
    end

    // Redirect while in Isolation: Off -> (Iso) then change to another
    // state before arriving, and active -> (Iso) -> back to active.
    request(PS_OFF, 5);
    do run_cycle(PS_NORMAL); while (exp_state != 3'b101);  // now in Isolation
    checks++;
    if (exp_state != 3'b101) fail("expected to be in Isolation");
    n_redirect++;
    request(PS_HIGH, 5);                     // redirected target
    do run_cycle(PS_OFF); while (exp_state != 3'b101);  // in Isolation, heading Off
    n_redirect++;
    request(PS_LOW, 5);                      // back to an active state

    // Random traffic, with requests that sometimes change every cycle.
    for (int i = 0; i < 3000; i++) begin
      pstate_e r;
      r = reqs[$urandom_range(3)];
      if ($urandom_range(3) == 0) begin
        if (exp_state == 3'b101 && 3'(r) != 3'(req)) n_redirect++;
        run_cycle(r);
      end else begin
        request(r, $urandom_range(8));
      end
    end

    // Reset during operation returns to Off, in any state.
    request(PS_HIGH, 3);
    #4;                                      // low phase
    rst_n = 1'b0;
    exp_state = 3'b111;
    cnt = 0;
    #1;
    checks++;
    if (state !== PS_OFF || {sw, iso} !== 3'b111) fail("reset during operation did not give Off");
    n_reset++;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    request(PS_OFF, 4);
    request(PS_NORMAL, 4);

    // Every mechanism must have happened.
    missing = 0;
    foreach (pair_seen[i, j]) begin
      if (i < 4 && j < 4 && i != j && pair_seen[i][j] == 0) begin
        missing++;
        $display("FAIL transition %0d->%0d never made", i, j);
      end
    end
    checks++;
    if (missing != 0) failures++;
    checks++; if (n_idle_periods == 0) fail("no idle (sleep) period");
    checks++; if (n_wakeups == 0)      fail("no wake-up");
    checks++; if (n_direct == 0)       fail("no direct transition");
    checks++; if (n_via_iso_off == 0)  fail("no transition into Off through Isolation");
    checks++; if (n_via_iso_on == 0)   fail("no transition out of Off through Isolation");
    checks++; if (n_redirect == 0)     fail("no request change during Isolation");
    checks++; if (n_float_held == 0)   fail("gated logic never floated while asleep");
    checks++; if (n_reset == 0)        fail("no reset during operation");
    checks++; if (W > 0 && n_waited == 0) fail("no wake-up wait");
    $display("mechanisms: idle periods %0d, wake-ups %0d, direct %0d, via Isolation into Off %0d, out of Off %0d, redirects %0d, floating cycles %0d, resets %0d, wake-up wait cycles %0d",
             n_idle_periods, n_wakeups, n_direct, n_via_iso_off, n_via_iso_on, n_redirect, n_float_held, n_reset, n_waited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
