// Self-checking testbench of stream_queue.
//
// Two queues are tested: one at the default size (16 x 8 bit) and a small
// one (depth 3) that reaches its flag corners often. Random writes (only
// while F is low, as the handshake requires) and random reads are compared
// against a reference FIFO kept as a SystemVerilog queue: head data while
// not empty, count, and the empty, F and AF flags (AF high at one or no free
// place) after every clock edge. Counts how often each queue was full and
// almost full with one place left.
module tb_stream_queue;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  int unsigned cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // default-size queue
  logic       wr0, rd0, em0, fu0, af0;
  logic [7:0] wd0, rdat0;
  logic [4:0] cnt0;
  stream_queue dut0 (.clk, .rst, .wr_en(wr0), .wr_data(wd0), .rd_en(rd0), .rd_data(rdat0),
                     .empty(em0), .full(fu0), .afull(af0), .count(cnt0));

  // small queue
  logic       wr1, rd1, em1, fu1, af1;
  logic [7:0] wd1, rdat1;
  logic [1:0] cnt1;
  stream_queue #(.DATA_W(8), .DEPTH(3)) dut1 (.clk, .rst, .wr_en(wr1), .wr_data(wd1), .rd_en(rd1),
                     .rd_data(rdat1), .empty(em1), .full(fu1), .afull(af1), .count(cnt1));

  logic [7:0] m0[$], m1[$];
  int full_seen[2], af_seen[2];

  task automatic check_q(int id, ref logic [7:0] m[$], input int depth, input logic em, fu, af,
                         input logic [7:0] rdat, input int cnt);
    checks++;
    if (em != (m.size() == 0) || fu != (m.size() == depth) || af != (m.size() >= depth - 1)
        || cnt != m.size() || (m.size() != 0 && rdat != m[0])) begin
      failures++;
      $display("FAIL q%0d size=%0d em=%0b fu=%0b af=%0b cnt=%0d rdat=%02h exp=%02h",
               id, m.size(), em, fu, af, cnt, rdat, (m.size() != 0) ? m[0] : 8'h00);
    end
    if (fu) full_seen[id]++;
    if (af && !fu) af_seen[id]++;
  endtask

  initial begin
    {wr0, rd0, wr1, rd1} = '0;
    wd0 = '0; wd1 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 6000; k++) begin
      int bias;
      // drift between filling and draining phases
      bias = ((k / 500) % 2 == 0) ? 70 : 30;
      @(negedge clk);
      wr0 = !fu0 && ($urandom_range(0, 99) < bias);
      rd0 = ($urandom_range(0, 99) < 100 - bias);
      wd0 = 8'($urandom);
      wr1 = !fu1 && ($urandom_range(0, 99) < 50);
      rd1 = ($urandom_range(0, 99) < 45);
      wd1 = 8'($urandom);
      @(posedge clk);
      // reference update: read takes the old head, write appends
      if (rd0 && m0.size() != 0) void'(m0.pop_front());
      if (wr0) m0.push_back(wd0);
      if (rd1 && m1.size() != 0) void'(m1.pop_front());
      if (wr1) m1.push_back(wd1);
      #1;
      check_q(0, m0, 16, em0, fu0, af0, rdat0, int'(cnt0));
      check_q(1, m1, 3, em1, fu1, af1, rdat1, int'(cnt1));
    end
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (full_seen[i] == 0 || af_seen[i] == 0) begin
        failures++;
        $display("FAIL queue %0d never full or almost full", i);
      end
    end
    $display("full cycles %0d/%0d, almost-full cycles %0d/%0d", full_seen[0], full_seen[1],
             af_seen[0], af_seen[1]);
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
