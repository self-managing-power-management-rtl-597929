// Self-checking testbench of the FSM transition logic.
// Applies every combination of current state and request (all 64 codes of
// the two 3-bit inputs) and compares the next state with a reference table
// written out row by row from the transition table: Off and the active
// states reach Off through Isolation, Isolation goes anywhere directly,
// everything else is direct. Codes that are not legal requests must hold
// the current state.
module tb_pmu_transition_logic;
  import pmu_pkg::*;

  pstate_e cur, req, nxt;
  int checks = 0, failures = 0;

  pmu_transition_logic dut (.cur_state(cur), .req_state(req), .next_state(nxt));

  function automatic logic [2:0] ref_next(logic [2:0] c, logic [2:0] r);
    // Rows: current state; columns: request 111, 100, 010, 000.
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
      default:          return c;   // undefined request or state: hold
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) begin
        cur = pstate_e'(c[2:0]);
        req = pstate_e'(r[2:0]);
        #1;
        checks++;
        if (nxt !== pstate_e'(ref_next(c[2:0], r[2:0]))) begin
          failures++;
          $display("FAIL cur=%b req=%b next=%b expected=%b", c[2:0], r[2:0], nxt,
                   ref_next(c[2:0], r[2:0]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
