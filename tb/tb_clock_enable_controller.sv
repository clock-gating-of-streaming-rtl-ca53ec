// Self-checking testbench of clock_enable_controller.
//
// Drives the F and AF flags with a directed sequence that walks every
// transition of the state diagram, then with random flag pairs (including the
// pair F=1, AF=0 that a queue never produces, which must hold the state).
// A reference model in the testbench, written as a table of
// (state, F, AF) -> next state, predicts state and EN; both are compared
// after every rising clock edge. EN must follow a flag change one clock
// later. Also counts how often each state was entered.
module tb_clock_enable_controller;
  import cg_pkg::*;

  logic clk = 1'b0, rst = 1'b1, f = 1'b0, af = 1'b0;
  logic en;
  cg_state_e state;
  int checks = 0, failures = 0;
  int unsigned cycles = 0;

  // reference model state, coded as integers 0..4 in diagram order
  int ref_st;
  int visits [5];

  clock_enable_controller dut (.clk, .rst, .f, .af, .en, .state);

  always #5 clk = ~clk;

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

  function automatic logic ref_en(int s);
    return !(s == 2 || s == 3);
  endfunction

  task automatic step(logic nf, logic naf);
    f  = nf;
    af = naf;
    @(posedge clk);
    ref_st = ref_next(ref_st, nf, naf);
    visits[ref_st]++;
    #1;
    checks++;
    if (int'(state) != ref_st || en != ref_en(ref_st)) begin
      failures++;
      $display("FAIL t=%0t f=%0b af=%0b state=%0d exp=%0d en=%0b", $time, nf, naf, state, ref_st, en);
    end
    @(negedge clk);
  endtask

  initial begin
    ref_st = 0;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (state != ST_INIT || en != 1'b1) begin failures++; $display("FAIL reset state"); end
    @(negedge clk);
    // directed walk: INIT stays while flags are up, then every arc
    step(1, 1); step(0, 1); step(0, 0);          // INIT stays, stays, -> SPACE
    step(0, 0); step(0, 1);                      // SPACE stays, -> AFULL_DISABLE
    step(0, 1); step(0, 0);                      // stays, -> SPACE
    step(0, 1); step(1, 1);                      // -> AFULL_DISABLE, -> FULL
    step(1, 1); step(0, 1);                      // FULL stays, -> AFULL_ENABLE
    step(0, 1); step(1, 1);                      // stays, -> FULL
    step(0, 1); step(0, 0);                      // -> AFULL_ENABLE, -> SPACE
    step(1, 0); step(0, 1); step(1, 0);          // unlisted pair holds state
    // random flag pairs
    repeat (2000) begin
      logic [1:0] r;
      r = 2'($urandom_range(0, 3));
      step(r[1], r[0]);
    end
    // synchronous reset from a disabling state
    step(0, 1);
    rst = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (state != ST_INIT || !en) begin failures++; $display("FAIL reset from state"); end
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL state %0d never entered", s); end
    end
    $display("states entered: INIT=%0d SPACE=%0d AFULL_DISABLE=%0d FULL=%0d AFULL_ENABLE=%0d",
             visits[0], visits[1], visits[2], visits[3], visits[4]);
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
