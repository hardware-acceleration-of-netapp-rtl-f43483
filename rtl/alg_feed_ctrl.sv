// alg_feed_ctrl: decides, each clock, which algorithm buffers hand a byte to
// the anchor algorithm (the cross-coupled enables between the two buffers).
//
// Buffer 1 holds the bytes entering the window, buffer 2 the same data stream
// for the bytes leaving it. For the first WINDOW (4093) bytes only buffer 1
// gives data; from then on a byte is taken only when neither buffer is empty,
// and both give one byte together. Nothing moves unless ALG_GO (`go`) is high
// and the result side is not stalled (`stall`, raised by the anchor write
// requestor when its queue is nearly full). This follows the description;
// the stall input is this design's own addition for when anchors arrive
// faster than they can be written to memory.
//
// out_count counts bytes given by buffer 1 (the window position); `warm` is
// high once WINDOW bytes have been given. All outputs are combinational from
// the inputs and out_count; out_count updates on the clock.
module alg_feed_ctrl #(
  parameter int unsigned WINDOW = anchor_pkg::WINDOW_LEN,
  parameter int unsigned CNT_W  = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             go,
  input  logic             stall,
  input  logic             b1_valid,
  input  logic             b2_valid,
  output logic             b1_rd,
  output logic             b2_rd,
  output logic             warm,
  output logic             starved,
  output logic [CNT_W-1:0] out_count
);
  assign warm    = (out_count >= CNT_W'(WINDOW));
  assign b1_rd   = go && !stall && b1_valid && (!warm || b2_valid);
  assign b2_rd   = go && !stall && warm && b1_valid && b2_valid;
  // running but held back only by a buffer with no data
  assign starved = go && !stall && !b1_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     out_count <= '0;
    else if (clear) out_count <= '0;
    else if (b1_rd) out_count <= out_count + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) b2_rd |-> b1_rd);
endmodule
