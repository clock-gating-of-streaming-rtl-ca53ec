// Behavioural stand-in for the actor of a clock-gated streaming stage (the
// place a de-blocking filter takes in the reference arrangement; its
// algorithm is not part of this RTL). Testbench use only.
//
// It takes one token from its input queue, transforms it with
// f(x) = 3*x + 1 (mod 256) into a holding register, and writes it into its
// output queue. It runs entirely on the gated clock aclk, reads its input
// queue only when there is a place for the result, and never writes while
// the output queue is full. With a free output queue it passes one token per
// clock. rd_en and wr_en are combinational from its register and the queue
// flags, so a request stays up while aclk is stopped.
module stand_in_actor #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              aclk,
  input  logic              rst,
  output logic              rd_en,
  input  logic [DATA_W-1:0] rd_data,
  input  logic              in_empty,
  output logic              wr_en,
  output logic [DATA_W-1:0] wr_data,
  input  logic              out_full
);
  logic              hold_v;
  logic [DATA_W-1:0] hold_d;

  assign wr_en   = hold_v && !out_full;
  assign wr_data = hold_d;
  assign rd_en   = !in_empty && (!hold_v || !out_full);

  always_ff @(posedge aclk) begin
    if (rst) begin
      hold_v <= 1'b0;
      hold_d <= '0;
    end else if (rd_en) begin
      hold_v <= 1'b1;
      hold_d <= DATA_W'(3 * rd_data + 1);
    end else if (wr_en) begin
      hold_v <= 1'b0;
    end
  end
endmodule
