// Self-checking testbench of the sleep and wake-up handler.
// Two instances share the inputs: one without a wake-up wait (the default)
// and one with WAKE_CYCLES = 3. Random current/requested state pairs are
// held for random numbers of cycles, equal about half the time. Per clock
// cycle the testbench checks that sleep is high exactly when the two are
// equal, and predicts from a cycle model of the wake counter whether the
// gated clock pulses: always when they differ without a wait, and only
// from the fourth cycle after waking with the wait. Inputs change in the
// high phase of clk, as the state register's output does.
module tb_pmu_sleep_handler;
  import pmu_pkg::*;

  localparam int unsigned W = 3;

  logic    clk = 1'b0;
  logic    rst_n = 1'b1;
  pstate_e cur, req;
  logic    gclk0, sleep0, gclkw, sleepw;
  int checks = 0, failures = 0;
  int sleeps = 0, wakes = 0, waited = 0;

  pmu_sleep_handler dut0 (.clk(clk), .rst_n(rst_n), .cur_state(cur), .req_state(req),
                          .gclk(gclk0), .sleep(sleep0));
  pmu_sleep_handler #(.WAKE_CYCLES(W)) dutw (.clk(clk), .rst_n(rst_n), .cur_state(cur),
                          .req_state(req), .gclk(gclkw), .sleep(sleepw));

  always #5 clk = ~clk;   // rising edges at 10k+5

  task automatic check(string what, logic got, logic exp, int i);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d: %s=%b expected %b (cur=%b req=%b)", i, what, got, exp, cur, req);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static pstate_e states[5] = '{PS_OFF, PS_ISO, PS_LOW, PS_NORMAL, PS_HIGH};
    logic same;
    int   cnt;      // reference wake counter of the WAKE_CYCLES instance
    cur = PS_OFF;
    req = PS_OFF;
    #2 rst_n = 1'b0;
    #4;                                     // t = 6, high phase
    rst_n = 1'b1;
    cnt = 0;
    for (int i = 0; i < 2000; i++) begin
      if (i == 0 || $urandom_range(3) == 0) begin
        cur = states[$urandom_range(4)];
        req = ($urandom_range(1) == 1) ? cur : states[$urandom_range(4)];
      end
      same = (cur == req);
      #5;                                   // low phase, latches transparent
      check("sleep", sleep0, same, i);
      check("sleep (wait)", sleepw, same, i);
      if (same) sleeps++; else wakes++;
      #5;                                   // next high phase
      check("gclk", gclk0, !same, i);
      check("gclk (wait)", gclkw, !same && cnt == int'(W), i);
      if (!same && cnt == int'(W) && cnt > 0) waited++;
      cnt = same ? 0 : ((cnt < int'(W)) ? cnt + 1 : cnt);
    end
    checks++;
    if (sleeps == 0 || wakes == 0 || waited == 0) begin
      failures++;
      $display("FAIL sleep, wake and waited wake not all exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
