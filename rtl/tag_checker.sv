// tag_checker: routes read-back data from local memory to the algorithm
// buffers.
//
// It watches the response stream leaving the memory controller interface. A
// header beat (rsp_sop) whose tag is ALG_TAG_BASE + i marks data requested for
// algorithm buffer i; the next REQ_BEATS (4) data beats, 64 bytes, are then
// forwarded to that buffer, one 16-byte burst per clock as they arrive. Other
// traffic is ignored here (the Tx format module handles it). Tag values are
// this design's; the header/four-burst behaviour follows the description.
module tag_checker
  import anchor_pkg::*;
#(
  parameter int unsigned NBUF      = 2,
  parameter int unsigned REQ_BEATS = anchor_pkg::REQ_BURSTS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rsp_valid,
  input  logic            rsp_sop,
  input  logic [127:0]    rsp_data,
  output logic [NBUF-1:0] buf_wr,
  output logic [127:0]    buf_data
);
  localparam int unsigned BW = $clog2(REQ_BEATS + 1);
  localparam int unsigned IW = (NBUF > 1) ? $clog2(NBUF) : 1;

  mem_hdr_t      hdr;
  logic [BW-1:0] remaining;
  logic [IW-1:0] target;
  logic          hit;
  logic [TAG_W-1:0] rel;

  assign hdr = mem_hdr_t'(rsp_data);
  assign rel = hdr.tag - ALG_TAG_BASE;
  assign hit = rsp_valid && rsp_sop && (hdr.tag >= ALG_TAG_BASE) &&
               (rel < TAG_W'(NBUF));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      target    <= '0;
    end else if (hit) begin
      remaining <= BW'(REQ_BEATS);
      target    <= IW'(rel);
    end else if (rsp_valid && !rsp_sop && remaining != 0) begin
      remaining <= remaining - 1'b1;
    end
  end

  always_comb begin
    buf_wr = '0;
    if (rsp_valid && !rsp_sop && remaining != 0) buf_wr[target] = 1'b1;
  end
  assign buf_data = rsp_data;
endmodule
