// Self-checking testbench of the state register.
// Checks the asynchronous reset to Off, that the register loads on gated
// clock edges only (it must hold while no edge arrives, however its input
// changes) and that the control struct carries the state bits {SW, ISO}.
module tb_pmu_state_register;
  import pmu_pkg::*;

  logic    gclk = 1'b0;
  logic    rst_n = 1'b1;
  pstate_e d, q;
  pctrl_t  ctrl;
  int checks = 0, failures = 0;

  pmu_state_register dut (.gclk(gclk), .rst_n(rst_n), .d(d), .q(q), .ctrl(ctrl));

  task automatic check(string what, logic [2:0] got, logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic pulse();
    #5 gclk = 1'b1;
    #5 gclk = 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static pstate_e states[5] = '{PS_OFF, PS_ISO, PS_LOW, PS_NORMAL, PS_HIGH};
    pstate_e held;
    d = PS_HIGH;
    #2 rst_n = 1'b0;
    #1 check("reset value", q, PS_OFF);
    check("reset controls", ctrl, 3'b111);
    pulse();
    check("reset dominates clock", q, PS_OFF);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      d = states[$urandom_range(4)];
      pulse();
      check("load", q, d);
      check("sw/iso", {ctrl.sw, ctrl.iso}, d);
      held = q;
      // no edge: input changes must not reach q
      repeat (3) begin
        d = pstate_e'($urandom_range(7));
        #3;
        check("hold without clock", q, held);
      end
    end
    // asynchronous reset without clock
    d = PS_NORMAL; pulse();
    #1 rst_n = 1'b0;
    #1 check("async reset", q, PS_OFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
