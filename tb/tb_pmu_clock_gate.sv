// Self-checking testbench of the latch-based clock gate.
// The enable is changed at random times in both clock phases. Reference: a
// gated pulse must follow a rising clock edge exactly when the enable held
// at the end of the preceding low phase was 1; changes of the enable during
// the high phase must not shorten, create or cut a pulse. Every rising edge
// of gclk must coincide with a rising edge of clk.
module tb_pmu_clock_gate;
  logic clk = 1'b0;
  logic en = 1'b0;
  logic gclk, en_l;
  int checks = 0, failures = 0;
  int gated_edges = 0, expected_edges = 0;

  pmu_clock_gate dut (.clk(clk), .en(en), .gclk(gclk), .en_latched(en_l));

  always #5 clk = ~clk;

  always @(posedge gclk) begin
    gated_edges++;
    checks++;
    if (clk !== 1'b1 || $time % 10 != 5) begin
      failures++;
      $display("FAIL gclk rose outside a clk rising edge at %0t", $time);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    // rising clk edges are at 5, 15, 25, ...
    #1;
    for (int i = 0; i < 200; i++) begin
      // clk is high during [10k+5, 10k+10) and low during [10k, 10k+5);
      // the time here is 10*i + 1, in a low phase
      en = 1'($urandom_range(1));
      #3;                       // 10*i + 4: clk low, latch transparent
      exp = en;
      if (exp) expected_edges++;
      #2;                       // 10*i + 6: clk high, pulse (or none)
      checks++;
      if (gclk !== exp) begin
        failures++;
        $display("FAIL cycle %0d: gclk=%b expected %b", i, gclk, exp);
      end
      en = ~en;                 // change during the high phase
      #2;                       // 10*i + 8: still high
      checks++;
      if (gclk !== exp) begin
        failures++;
        $display("FAIL cycle %0d: enable change in high phase altered gclk", i);
      end
      #3;                       // 10*(i+1) + 1: low phase
      checks++;
      if (gclk !== 1'b0) begin
        failures++;
        $display("FAIL cycle %0d: gclk high in low phase", i);
      end
    end
    checks++;
    if (gated_edges != expected_edges) begin
      failures++;
      $display("FAIL gated edges %0d expected %0d", gated_edges, expected_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
