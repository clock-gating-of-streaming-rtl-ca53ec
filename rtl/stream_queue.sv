// FIFO queue that connects two actors of a dataflow network.
//
// Besides the usual empty and full (F) flags it drives the almost-full flag
// (AF) that the clock enabling controller reads. AF is high when at most one
// place is left, so that F=1 always comes with AF=1, which is the flag pairing
// the controller's state diagram expects. The queue is a circular buffer in a
// memory array with a read and a write pointer and an occupancy counter; the
// head word is visible on rd_data while empty is low (first-word
// fall-through). Depth, width, reset and the read/write handshake are this
// design's own choices: the data width of 8 bits matches the byte-wide
// buses of the design's simulation; the depth of 16 is not given.
//
// Interface: a write is taken at a rising clock edge when wr_en is high and
// the queue is not full; a read (pop) is taken when rd_en is high and the
// queue is not empty. A write and a read may happen in the same cycle. The
// writer must not write while F is high; an assertion checks this rule.
// Timing: flags and count are registered and change one clock after the
// transfer that changes them; rd_data shows the new head in that same cycle.
module stream_queue #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst,      // synchronous, active high: empties the queue
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data,
  output logic              empty,
  output logic              full,     // F
  output logic              afull,    // AF: at most one place left
  output logic [CW-1:0]     count
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wptr, rptr;
  logic [CW-1:0]     cnt;
  logic              do_wr, do_rd;

  assign do_wr = wr_en && (cnt != CW'(DEPTH));
  assign do_rd = rd_en && (cnt != '0);

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      case ({do_wr, do_rd})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  assign rd_data = mem[rptr];
  assign empty   = (cnt == '0);
  assign full    = (cnt == CW'(DEPTH));
  assign afull   = (cnt >= CW'(DEPTH - 1));
  assign count   = cnt;

  // Handshake rule: the writer honours F.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (rst) !(wr_en && full))
    else $error("stream_queue: write while full");

endmodule
