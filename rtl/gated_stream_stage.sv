// One clock-gated element of a streaming (dataflow) application: an input
// queue, an actor, an output queue, and the clock enabler that stops the
// actor's clock while its output queue is almost full or full.
//
// The actor itself (in the reference arrangement a video de-blocking filter)
// is not part of this module: its ports are brought out with the act_
// prefix, and it must be clocked by act_clk. Everything else runs on the
// free-running clock clk.
//
// How it works: the output queue's F and AF flags drive the clock enabler.
// When the output queue has at most one free place the enabler stops
// act_clk; when a consumer frees a place it lets the clock run again, so an
// actor that could not write anyway burns no clock power, and no data
// throughput is lost. The input queue's F and AF flags are brought out
// (in_full, in_afull) for the clock enabler of the upstream actor.
//
// Transfers with the actor: the queues sit on clk, the actor on act_clk. A
// read of the input queue (act_rd_en) and a write into the output queue
// (act_wr_en) are taken only at clock edges that also reach the actor, i.e.
// when the enabler's re-timed enable act_ce is high. An actor whose clock is
// stopped thus holds its request, and the request is taken at the first edge
// the actor sees again. This qualification is this design's own choice; it
// keeps queue and actor in step across a stopped clock. The actor must not
// write while act_out_full is high.
//
// Parameters: DATA_W (8, the byte-wide buses of the design's simulation) and
// DEPTH (16, not given) for both queues.
module gated_stream_stage
  import cg_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 16,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst,
  // upstream side of the input queue
  input  logic              in_wr_en,
  input  logic [DATA_W-1:0] in_wr_data,
  output logic              in_full,
  output logic              in_afull,
  // actor side (actor clocked by act_clk)
  output logic              act_clk,
  output logic              act_ce,
  input  logic              act_rd_en,
  output logic [DATA_W-1:0] act_rd_data,
  output logic              act_in_empty,
  input  logic              act_wr_en,
  input  logic [DATA_W-1:0] act_wr_data,
  output logic              act_out_full,
  // downstream side of the output queue
  input  logic              out_rd_en,
  output logic [DATA_W-1:0] out_rd_data,
  output logic              out_empty,
  // observation
  output logic              cg_en,
  output cg_state_e         cg_state,
  output logic [CW-1:0]     in_count,
  output logic [CW-1:0]     out_count
);

  logic out_afull;

  stream_queue #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_in_queue (
    .clk     (clk),
    .rst     (rst),
    .wr_en   (in_wr_en),
    .wr_data (in_wr_data),
    .rd_en   (act_rd_en && act_ce),
    .rd_data (act_rd_data),
    .empty   (act_in_empty),
    .full    (in_full),
    .afull   (in_afull),
    .count   (in_count)
  );

  stream_queue #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_out_queue (
    .clk     (clk),
    .rst     (rst),
    .wr_en   (act_wr_en && act_ce),
    .wr_data (act_wr_data),
    .rd_en   (out_rd_en),
    .rd_data (out_rd_data),
    .empty   (out_empty),
    .full    (act_out_full),
    .afull   (out_afull),
    .count   (out_count)
  );

  clock_enabler u_clock_enabler (
    .clk   (clk),
    .rst   (rst),
    .f     (act_out_full),
    .af    (out_afull),
    .en    (cg_en),
    .ce    (act_ce),
    .gclk  (act_clk),
    .state (cg_state)
  );

endmodule
