// anchor_algorithm: the anchor-detect rolling hash.
//
// Three hash lanes of 64, 61 and 59 bits each hold a rotating register. For
// every accepted byte each lane rotates left by one and XORs in the input
// table value of the entering byte and, once the window is full, the exit
// table value of the byte that entered WINDOW (4093) bytes earlier. Because
// the exit table is the input table pre-rotated by WINDOW, a byte's effect
// vanishes exactly when it leaves the window. The three lanes are XORed into
// one 64-bit hash (narrow lanes zero-extended), ANDed with the mask register
// and compared with the mask: when every inspected bit is one, the position is
// an anchor. Lane structure, widths, masking and the compare against the mask
// register follow the design description; rotate-by-one per byte and
// "all inspected bits are one" are this design's reading of it.
//
// Interface: in_valid/in_byte is the entering byte, exit_valid/exit_byte the
// leaving one (exit_valid is low for the first WINDOW bytes). There is no
// backpressure: the feeder stops sending when the result consumer is busy.
// `clear` restarts the hash and the result counter.
//
// Timing: one byte per clock. Tables are synchronous ROMs, so the result of a
// byte (res_valid, res_offset = its 0-based position, res_hash) appears two
// clocks after it is presented. anchor_valid marks results that are anchors;
// anchor_offset/anchor_value carry the position and the unmasked hash.
module anchor_algorithm
  import anchor_pkg::*;
#(
  parameter int unsigned WINDOW = anchor_pkg::WINDOW_LEN,
  parameter int unsigned W0     = LANE_W0,
  parameter int unsigned W1     = LANE_W1,
  parameter int unsigned W2     = LANE_W2,
  parameter int unsigned CNT_W  = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [63:0]      mask,
  input  logic             in_valid,
  input  logic [7:0]       in_byte,
  input  logic             exit_valid,
  input  logic [7:0]       exit_byte,
  output logic             res_valid,
  output logic [CNT_W-1:0] res_offset,
  output logic [63:0]      res_hash,
  output logic             anchor_valid,
  output logic [CNT_W-1:0] anchor_offset,
  output logic [63:0]      anchor_value,
  output logic [CNT_W-1:0] result_count
);

  // ---- stage 1: table lookups ------------------------------------------
  logic [W0-1:0] in0, ex0;
  logic [W1-1:0] in1, ex1;
  logic [W2-1:0] in2, ex2;

  anchor_lut #(.WIDTH(W0), .LANE(0), .EXIT(1'b0), .WINDOW(WINDOW)) u_in0 (.clk, .en(in_valid),   .addr(in_byte),   .data(in0));
  anchor_lut #(.WIDTH(W0), .LANE(0), .EXIT(1'b1), .WINDOW(WINDOW)) u_ex0 (.clk, .en(exit_valid), .addr(exit_byte), .data(ex0));
  anchor_lut #(.WIDTH(W1), .LANE(1), .EXIT(1'b0), .WINDOW(WINDOW)) u_in1 (.clk, .en(in_valid),   .addr(in_byte),   .data(in1));
  anchor_lut #(.WIDTH(W1), .LANE(1), .EXIT(1'b1), .WINDOW(WINDOW)) u_ex1 (.clk, .en(exit_valid), .addr(exit_byte), .data(ex1));
  anchor_lut #(.WIDTH(W2), .LANE(2), .EXIT(1'b0), .WINDOW(WINDOW)) u_in2 (.clk, .en(in_valid),   .addr(in_byte),   .data(in2));
  anchor_lut #(.WIDTH(W2), .LANE(2), .EXIT(1'b1), .WINDOW(WINDOW)) u_ex2 (.clk, .en(exit_valid), .addr(exit_byte), .data(ex2));

  logic s1_valid, s1_exit;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_exit  <= 1'b0;
    end else begin
      s1_valid <= in_valid & ~clear;
      s1_exit  <= exit_valid & ~clear;
    end
  end

  // ---- stage 2: rotate and accumulate -----------------------------------
  logic [W0-1:0] h0;
  logic [W1-1:0] h1;
  logic [W2-1:0] h2;

  function automatic logic [W0-1:0] rot0(input logic [W0-1:0] v);
    return {v[W0-2:0], v[W0-1]};
  endfunction
  function automatic logic [W1-1:0] rot1(input logic [W1-1:0] v);
    return {v[W1-2:0], v[W1-1]};
  endfunction
  function automatic logic [W2-1:0] rot2(input logic [W2-1:0] v);
    return {v[W2-2:0], v[W2-1]};
  endfunction

  logic [CNT_W-1:0] count;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h0 <= '0; h1 <= '0; h2 <= '0;
      count     <= '0;
      res_valid <= 1'b0;
    end else if (clear) begin
      h0 <= '0; h1 <= '0; h2 <= '0;
      count     <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= s1_valid;
      if (s1_valid) begin
        h0 <= rot0(h0) ^ in0 ^ (s1_exit ? ex0 : '0);
        h1 <= rot1(h1) ^ in1 ^ (s1_exit ? ex1 : '0);
        h2 <= rot2(h2) ^ in2 ^ (s1_exit ? ex2 : '0);
        count <= count + 1'b1;
      end
    end
  end

  // ---- combine, mask, compare -------------------------------------------
  assign res_hash     = 64'(h0) ^ 64'(h1) ^ 64'(h2);
  assign res_offset   = count - 1'b1;
  assign result_count = count;

  assign anchor_valid  = res_valid && ((res_hash & mask) == mask);
  assign anchor_offset = res_offset;
  assign anchor_value  = res_hash;

  // The feeder never presents an exit byte without an entering byte.
  assert property (@(posedge clk) disable iff (!rst_n) exit_valid |-> in_valid);

endmodule
