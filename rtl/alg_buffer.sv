// alg_buffer: algorithm buffer. Takes 16 bytes (one memory burst) at a time
// and hands them to the anchor algorithm one byte per clock, in order.
//
// It is built, as described for the design, from LANES byte-wide FIFOs of
// DEPTH entries (16 x 16 = 256 bytes, the data of four 64-byte requests).
// Byte i of every burst goes to lane i; a lane pointer selects which lane
// supplies the next output byte and advances after every read, so bytes leave
// in their original order.
//
// Refill: the buffer keeps a count of requested-but-not-arrived 64-byte
// requests ("waiting"). Whenever bytes held + 64 x waiting leaves at least 64
// bytes free, it pulses need_data for one clock (to the data requestor) and
// counts one more waiting request. Every REQ_BEATS arriving bursts retire one
// waiting request. The free-space rule (at least 64 bytes free) follows the
// text of the description; its figure prints a strict "<" that would leave
// one request slot unused.
//
// Interface: wr_valid/wr_data (byte i in bits 8i+7:8i, never more than the
// free space), rd_en (only while rd_valid), rd_valid/rd_data show-ahead.
// count is the number of bytes held.
module alg_buffer
  import anchor_pkg::*;
#(
  parameter int unsigned LANES     = 16,
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned REQ_BYTES = anchor_pkg::REQ_SIZE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_valid,
  input  logic [8*LANES-1:0]   wr_data,
  input  logic                 rd_en,
  output logic                 rd_valid,
  output logic [7:0]           rd_data,
  output logic                 need_data,
  output logic [$clog2(LANES*DEPTH):0] count,
  output logic [$clog2(LANES*DEPTH):0] waiting
);
  localparam int unsigned CAP   = LANES * DEPTH;
  localparam int unsigned CW    = $clog2(CAP) + 1;
  localparam int unsigned LW    = (LANES > 1) ? $clog2(LANES) : 1;
  localparam int unsigned BEATS = REQ_BYTES / LANES;   // bursts per request
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic [LANES-1:0] lane_pop, lane_empty, lane_full;
  logic [7:0]       lane_dout [LANES];
  logic [LW-1:0]    rd_lane;

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    byte_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (wr_valid),
      .din  (wr_data[8*i +: 8]),
      .pop  (lane_pop[i]),
      .dout (lane_dout[i]),
      .empty(lane_empty[i]),
      .full (lane_full[i])
    );
    assign lane_pop[i] = rd_en && (rd_lane == LW'(i));
  end

  assign rd_valid = (count != 0);
  assign rd_data  = lane_dout[rd_lane];

  // refill bookkeeping
  logic [BW-1:0] beat_cnt;
  logic          req_done;
  logic [CW+2:0] committed;

  assign req_done  = wr_valid && (beat_cnt == BW'(BEATS - 1));
  assign committed = (CW+3)'(count) + (CW+3)'(waiting) * (CW+3)'(REQ_BYTES);
  assign need_data = (committed + (CW+3)'(REQ_BYTES)) <= (CW+3)'(CAP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_lane  <= '0;
      count    <= '0;
      waiting  <= '0;
      beat_cnt <= '0;
    end else begin
      if (rd_en) rd_lane <= (rd_lane == LW'(LANES - 1)) ? '0 : rd_lane + 1'b1;
      count <= count + (wr_valid ? CW'(LANES) : '0) - CW'(rd_en);
      if (wr_valid) beat_cnt <= req_done ? '0 : beat_cnt + 1'b1;
      waiting <= waiting + CW'(need_data) - CW'(req_done);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_valid);
  assert property (@(posedge clk) disable iff (!rst_n) wr_valid |-> (32'(count) + LANES <= CAP + 32'(rd_en)));
  assert property (@(posedge clk) disable iff (!rst_n) req_done |-> (waiting != 0 || need_data));
endmodule
