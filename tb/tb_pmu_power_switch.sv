// Self-checking testbench of the power switch model.
// Instant switch (default): awake, the virtual supply is on and the gated
// logic's value passes unchanged; asleep, the supply is off and the driven
// value floats, so over many input changes at least one must differ from
// the logic's value. A second instance with a 7 ns ramp must keep the
// supply off for 7 ns after sleep falls, pass the logic value afterwards,
// and drop the supply at once when sleep rises, also in mid-ramp.
module tb_pmu_power_switch;
  logic       sleep;
  logic [2:0] lin, lout, lout_r;
  logic       vdd_on, vdd_on_r;
  int checks = 0, failures = 0;
  int differs = 0;

  pmu_power_switch #(.WIDTH(3)) dut (.sleep(sleep), .logic_in(lin), .vdd_on(vdd_on), .logic_out(lout));
  pmu_power_switch #(.WIDTH(3), .RAMP_NS(7)) dut_r (.sleep(sleep), .logic_in(lin), .vdd_on(vdd_on_r),
                                                    .logic_out(lout_r));

  task automatic check(string what, logic [2:0] got, logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t: %s = %b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sleep = 1'b1;
    lin = '0;
    #20;
    // instant switch
    for (int i = 0; i < 200; i++) begin
      sleep = (i % 4 == 3);
      lin = 3'($urandom_range(7));
      #10;
      check("vdd_on", 3'(vdd_on), 3'(!sleep));
      if (!sleep) check("powered logic value", lout, lin);
      else if (lout != lin) differs++;
    end
    checks++;
    if (differs == 0) begin
      failures++;
      $display("FAIL unpowered logic never floated");
    end
    // ramped switch
    sleep = 1'b1;
    #20;
    check("ramp: off while asleep", 3'(vdd_on_r), 3'b0);
    sleep = 1'b0;
    #6;
    check("ramp: still off at 6 ns", 3'(vdd_on_r), 3'b0);
    #2;
    check("ramp: on at 8 ns", 3'(vdd_on_r), 3'b1);
    lin = 3'b110;
    #1;
    check("ramp: logic value passed", lout_r, 3'b110);
    sleep = 1'b1;
    #0.1;
    check("ramp: off at once", 3'(vdd_on_r), 3'b0);
    #10;
    sleep = 1'b0;
    #3;
    sleep = 1'b1;                            // sleep again within the ramp
    #10;
    check("ramp: aborted ramp stays off", 3'(vdd_on_r), 3'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
