// anchor_write_req: stores anchors found by the algorithm into local memory.
//
// Each anchor (its byte offset and unmasked 64-bit hash) is queued in a small
// FIFO and then offered to the memory arbiter as a one-burst write request at
// base + 16 x n, where n counts anchors since `load`: offset in bytes 0-7,
// value in bytes 8-15. The base address is set beforehand by the host. When
// the queue has room for fewer than STALL_MARGIN further anchors, `stall` asks
// the feed control to pause the algorithm so no anchor is lost. Writing to a
// preset base follows the description; the record layout, queue and stall are
// this design's own.
module anchor_write_req
  import anchor_pkg::*;
#(
  parameter int unsigned QDEPTH       = 8,
  parameter int unsigned STALL_MARGIN = 3,
  parameter int unsigned CNT_W        = 48
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] base,
  input  logic              anchor_valid,
  input  logic [CNT_W-1:0]  anchor_offset,
  input  logic [63:0]       anchor_value,
  output logic              req_valid,
  output mem_req_t          req,
  input  logic              req_ready,
  output logic              stall,
  output logic [31:0]       anchors_written
);
  localparam int unsigned QW = $clog2(QDEPTH);

  logic [127:0]  q [QDEPTH];
  logic [QW-1:0] wp, rp;
  logic [QW:0]   cnt;
  logic [ADDR_W-1:0] next_addr;
  logic          fire;

  assign req_valid = (cnt != 0);
  assign fire      = req_valid && req_ready;
  assign stall     = (32'(cnt) + STALL_MARGIN) >= QDEPTH;

  always_comb begin
    req      = '0;
    req.wr   = 1'b1;
    req.tag  = ANCHOR_TAG;
    req.len  = LEN_W'(1);
    req.addr = next_addr;
    req.data = q[rp];
  end

  always_ff @(posedge clk) begin
    if (anchor_valid) q[wp] <= {anchor_value, 64'(anchor_offset)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
      next_addr <= '0;
      anchors_written <= '0;
    end else begin
      if (anchor_valid) wp <= (wp == QW'(QDEPTH - 1)) ? '0 : wp + 1'b1;
      if (fire)         rp <= (rp == QW'(QDEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (QW+1)'(anchor_valid) - (QW+1)'(fire);
      if (load) begin
        next_addr <= base;
        anchors_written <= '0;
      end else if (fire) begin
        next_addr <= next_addr + ADDR_W'(BEAT_BYTES);
        anchors_written <= anchors_written + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   anchor_valid |-> (32'(cnt) < QDEPTH || fire));
endmodule
