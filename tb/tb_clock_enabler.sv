// Self-checking testbench of clock_enabler.
//
// The F and AF inputs come from a modelled queue occupancy (depth 6) that a
// random writer and reader move by at most one place per cycle, so the flags
// behave as a real queue's do. A reference model (transition table of the
// controller, plus a one-cycle delay for the re-timing flip-flop) predicts EN
// and CE. The testbench counts rising edges of the gated clock within every
// clock period and checks that exactly one occurs when CE was high before
// the edge and none otherwise. It also checks the latency: when the
// controller samples AF=1 in SPACE at edge t, gated edge t+1 still occurs
// and edge t+2 is the first missing one. It counts clock-stop episodes and
// every controller state.
module tb_clock_enabler;
  import cg_pkg::*;

  localparam int DEPTH = 6;

  logic clk = 1'b0, rst = 1'b1, f, af;
  logic en, ce, gclk;
  cg_state_e state;
  int checks = 0, failures = 0;
  int unsigned cycles = 0;
  int occ = 0;
  int ref_st = 0;
  logic ref_ce = 1'b1;
  int unsigned gedges = 0;
  int stops = 0, lat_checks = 0;
  int visits [5];
  int since_af = -1;

  clock_enabler dut (.clk, .rst, .f, .af, .en, .ce, .gclk, .state);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  always @(posedge gclk) gedges++;

  assign f  = (occ == DEPTH);
  assign af = (occ >= DEPTH - 1);

  function automatic int ref_next(int s, logic ff, logic aa);
    case (s)
      0: return (!ff && !aa) ? 1 : 0;
      1: return (!ff &&  aa) ? 2 : 1;
      2: if (!ff && !aa) return 1; else if (ff && aa) return 3; else return 2;
      3: return (!ff &&  aa) ? 4 : 3;
      4: if (!ff && !aa) return 1; else if (ff && aa) return 3; else return 4;
      default: return 0;
    endcase
  endfunction

  initial begin
    int unsigned e0;
    logic ce_pre, en_pre;
    int st_pre;
    logic f_pre, af_pre;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 5000; k++) begin
      int bias;
      bias = ((k / 300) % 2 == 0) ? 65 : 35;
      @(negedge clk);
      // move occupancy by at most one place
      if ($urandom_range(0, 99) < bias) begin
        if (occ < DEPTH) occ++;
      end else if ($urandom_range(0, 99) < 80) begin
        if (occ > 0) occ--;
      end
      #1;
      e0 = gedges;
      ce_pre = ref_ce;
      st_pre = ref_st;
      f_pre = f; af_pre = af;
      @(posedge clk);
      #1;
      // reference update
      ref_ce = !(st_pre == 2 || st_pre == 3);
      ref_st = ref_next(st_pre, f_pre, af_pre);
      visits[ref_st]++;
      checks++;
      if ((gedges - e0) != (ce_pre ? 1 : 0)) begin
        failures++;
        $display("FAIL k=%0d gated edges %0d with ce_pre=%0b", k, gedges - e0, ce_pre);
      end
      checks++;
      if (int'(state) != ref_st || ce != ref_ce || en != !(ref_st == 2 || ref_st == 3)) begin
        failures++;
        $display("FAIL k=%0d state=%0d/%0d ce=%0b/%0b", k, state, ref_st, ce, ref_ce);
      end
      if (ce_pre && !ref_ce) stops++;
      // latency: AF seen in SPACE at edge t -> first missing gated edge at t+3
      if (st_pre == 1 && !f_pre && af_pre) since_af = 0;
      else if (since_af >= 0) since_af++;
      if (since_af == 1) begin
        // the edge just checked is t+1; the next one (t+2) must be missing
        lat_checks++;
        checks++;
        if (ce != 1'b0) begin failures++; $display("FAIL latency: clock not stopped at 3rd edge"); end
        since_af = -1;
      end
    end
    for (int s = 1; s < 5; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL state %0d never entered", s); end
    end
    checks++;
    if (stops == 0 || lat_checks == 0) begin failures++; $display("FAIL clock never stopped"); end
    $display("clock stops %0d, latency checks %0d, states S=%0d AD=%0d F=%0d AE=%0d", stops,
             lat_checks, visits[1], visits[2], visits[3], visits[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
