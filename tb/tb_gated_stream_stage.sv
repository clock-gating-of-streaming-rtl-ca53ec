// End-to-end testbench of gated_stream_stage, at the default parameters
// (8-bit tokens, queues of depth 16).
//
// A producer writes a numbered token stream into the input queue whenever it
// is not full, a stand-in actor (f(x) = 3*x + 1) runs on the stage's gated
// clock, and a consumer reads the output queue. The run has phases:
// free flow (consumer reads every cycle: full rate must be kept, no clock
// stops), heavy back-pressure (consumer mostly stalled: the output queue
// fills, the actor's clock is stopped, the input queue fills), a long
// consumer stop, random traffic, and a final drain.
// Checks: every token arrives once, in order, transformed; the actor clock
// has an edge in a clock period exactly when the enable act_ce was high; the
// actor clock never runs while the output queue is full for longer than the
// enable latency; throughput in free flow is one token per clock. It counts
// each mechanism and fails if one never happened: clock stop, clock
// restart, every controller state, return from AFULL_DISABLE to SPACE, a
// request held across a stopped clock, input queue full, output queue full.
module tb_gated_stream_stage;
  import cg_pkg::*;

  localparam int DATA_W = 8;
  localparam int DEPTH  = 16;
  localparam int CW     = $clog2(DEPTH + 1);
  localparam int NTOK   = 3000;

  logic clk = 1'b0, rst = 1'b1;
  logic in_wr_en = 1'b0, in_full, in_afull;
  logic [DATA_W-1:0] in_wr_data = '0;
  logic act_clk, act_ce, act_rd_en, act_in_empty, act_wr_en, act_out_full;
  logic [DATA_W-1:0] act_rd_data, act_wr_data;
  logic out_rd_en = 1'b0, out_empty;
  logic [DATA_W-1:0] out_rd_data;
  logic cg_en;
  cg_state_e cg_state;
  logic [CW-1:0] in_count, out_count;

  int checks = 0, failures = 0;
  int unsigned cycles = 0;

  gated_stream_stage dut (.*);

  stand_in_actor u_actor (
    .aclk     (act_clk),
    .rst      (rst),
    .rd_en    (act_rd_en),
    .rd_data  (act_rd_data),
    .in_empty (act_in_empty),
    .wr_en    (act_wr_en),
    .wr_data  (act_wr_data),
    .out_full (act_out_full)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  int unsigned aedges = 0;
  always @(posedge act_clk) aedges++;

  // mechanism counters
  int n_stop = 0, n_restart = 0, n_ad_to_space = 0, n_held = 0;
  int n_in_full = 0, n_out_full = 0, n_gated_cycles = 0;
  int visits [5];

  int full_run = 0;
  int sent = 0, recvd = 0;
  int phase = 0;         // 0 free flow, 1 back-pressure, 2 stop, 3 random, 4 drain
  int free_recv_start = 0, free_recv_end = 0;

  // producer and consumer, driven on the falling edge
  always @(negedge clk) begin
    if (!rst) begin
      in_wr_en   <= (sent < NTOK) && !in_full && (phase == 3 ? ($urandom_range(0, 3) != 0) : 1'b1);
      in_wr_data <= DATA_W'(sent);
      case (phase)
        0, 4:    out_rd_en <= 1'b1;
        1:       out_rd_en <= ($urandom_range(0, 9) == 0);
        2:       out_rd_en <= 1'b0;
        default: out_rd_en <= ($urandom_range(0, 1) == 0);
      endcase
    end
  end

  // per-edge checking
  cg_state_e st_prev = ST_INIT;
  logic ce_prev = 1'b1;
  int unsigned aedges_prev = 0;
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      // act_clk edge exactly when ce was high before this edge
      checks++;
      if ((aedges - aedges_prev) != (ce_prev ? 1 : 0)) begin
        failures++;
        $display("FAIL t=%0t actor edges %0d with ce=%0b", $time, aedges - aedges_prev, ce_prev);
      end
      if (!ce_prev) n_gated_cycles++;
      if (ce_prev && !act_ce) n_stop++;
      if (!ce_prev && act_ce) n_restart++;
      if (st_prev == ST_AFULL_DISABLE && cg_state == ST_SPACE) n_ad_to_space++;
      if (cg_state != st_prev) visits[int'(cg_state)]++;
      if (!act_ce && (act_rd_en || act_wr_en)) n_held++;
      if (in_full) n_in_full++;
      // after the enable latency a full output queue means a stopped clock
      full_run = act_out_full ? full_run + 1 : 0;
      if (full_run >= 3) begin
        checks++;
        if (act_ce) begin failures++; $display("FAIL t=%0t clock runs into a full queue", $time); end
      end
      if (act_out_full) n_out_full++;
    end
    aedges_prev = aedges;
    ce_prev = act_ce;
    st_prev = cg_state;
  end

  // transfers as seen at the clock edge
  always @(posedge clk) begin
    if (!rst) begin
      if (in_wr_en && !in_full) sent++;
      if (out_rd_en && !out_empty) begin
        checks++;
        if (out_rd_data != DATA_W'(3 * recvd + 1)) begin
          failures++;
          $display("FAIL token %0d: got %02h expected %02h", recvd, out_rd_data,
                   DATA_W'(3 * recvd + 1));
        end
        recvd++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // free flow: after warm-up the stage must pass one token per clock
    phase = 0;
    repeat (50) @(posedge clk);
    free_recv_start = recvd;
    repeat (200) @(posedge clk);
    free_recv_end = recvd;
    checks++;
    if (free_recv_end - free_recv_start != 200 || n_stop != 0) begin
      failures++;
      $display("FAIL free flow: %0d tokens in 200 clocks, %0d clock stops",
               free_recv_end - free_recv_start, n_stop);
    end
    phase = 1; repeat (600) @(posedge clk);
    phase = 2; repeat (100) @(posedge clk);
    // with the consumer stopped both queues are full and the actor's clock off
    checks++;
    if (!act_out_full || !in_full || act_ce || cg_state != ST_FULL) begin
      failures++;
      $display("FAIL stop phase: out_full=%0b in_full=%0b ce=%0b state=%0d", act_out_full,
               in_full, act_ce, cg_state);
    end
    phase = 3; repeat (2000) @(posedge clk);
    phase = 4;
    wait (recvd == NTOK);
    repeat (10) @(posedge clk);
    checks++;
    if (recvd != NTOK || sent != NTOK || !out_empty) begin
      failures++;
      $display("FAIL counts: sent %0d received %0d", sent, recvd);
    end
    checks++;
    if (n_stop == 0 || n_restart == 0 || n_ad_to_space == 0 || n_held == 0 ||
        n_in_full == 0 || n_out_full == 0 || visits[1] == 0 || visits[2] == 0 ||
        visits[3] == 0 || visits[4] == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("clock stops %0d, restarts %0d, gated cycles %0d of %0d, AFULL_DISABLE->SPACE %0d",
             n_stop, n_restart, n_gated_cycles, cycles, n_ad_to_space);
    $display("states entered SPACE=%0d AFULL_DISABLE=%0d FULL=%0d AFULL_ENABLE=%0d",
             visits[1], visits[2], visits[3], visits[4]);
    $display("held requests %0d, input-full cycles %0d, output-full cycles %0d",
             n_held, n_in_full, n_out_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
