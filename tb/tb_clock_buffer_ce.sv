// Self-checking testbench of clock_buffer_ce.
//
// CE is driven from a flip-flop on the input clock with a random pattern, as
// in the clock enabler. The testbench counts rising edges of the gated clock
// and checks, at every input clock edge, that the gated clock rose exactly
// when CE was high in the preceding cycle, that it stays low while disabled,
// and that every gated high pulse is a full input-clock high phase (no
// glitch). A CE toggle in the middle of the high phase must not cut a pulse.
module tb_clock_buffer_ce;
  logic clk = 1'b0, ce = 1'b0, o;
  int checks = 0, failures = 0;
  int unsigned cycles = 0;
  int unsigned o_edges = 0, exp_edges = 0;
  logic ce_before;
  realtime t_rise;
  logic seen_rise = 1'b0;

  clock_buffer_ce dut (.i(clk), .ce(ce), .o(o));

  always #5 clk = ~clk;

  always @(posedge o) begin
    o_edges++;
    t_rise = $realtime;
    seen_rise = 1'b1;
  end

  always @(negedge o) if (seen_rise) begin
    checks++;
    if ($realtime - t_rise != 5.0) begin
      failures++;
      $display("FAIL glitch: pulse of %0t", $realtime - t_rise);
    end
  end

  initial begin
    // settle the latch while clk is low
    #2;
    for (int k = 0; k < 3000; k++) begin
      ce_before = ce;
      @(posedge clk);
      #1;
      checks++;
      if (o != (clk & ce_before)) begin
        failures++;
        $display("FAIL edge %0d: o=%0b ce_before=%0b", k, o, ce_before);
      end
      if (ce_before) exp_edges++;
      // in the middle of the high phase, wiggle CE: must have no effect
      if (k % 7 == 3) begin
        ce = ~ce;
        #1;
        checks++;
        if (o != ce_before) begin failures++; $display("FAIL CE change in high phase cut the clock"); end
        ce = ~ce;
      end
      // registered CE update (as from a flip-flop on clk)
      ce = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      #1;
      checks++;
      if (o != 1'b0) begin failures++; $display("FAIL o high while clk low"); end
    end
    checks++;
    if (o_edges != exp_edges) begin
      failures++;
      $display("FAIL edge count %0d expected %0d", o_edges, exp_edges);
    end
    $display("gated edges %0d of 3000", o_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
