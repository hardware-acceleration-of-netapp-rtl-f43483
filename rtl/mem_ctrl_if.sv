// mem_ctrl_if: memory controller interface. Executes request packets from
// the memory arbiter on the local memory and returns read data as packets.
//
// A write request stores its one 16-byte burst in the accepting clock. A read
// request of `len` bursts produces, on the response stream, a header beat
// (rsp_sop=1, tag/len/address in mem_hdr_t layout) one clock after it is
// accepted, followed by its `len` data beats on consecutive clocks. While a
// read is being issued the interface is busy (req_ready low). The response
// stream has no backpressure. Returning read data as a header packet followed
// by 16-byte data packets follows the description; the DDR2 controller, its
// error correction and the DIMMs lie outside this module: the local memory is
// reached through a simple synchronous port (mem_* signals, one 128-bit word
// per 16 bytes, read data one clock after mem_en).
module mem_ctrl_if
  import anchor_pkg::*;
#(
  parameter int unsigned MEM_AW = ADDR_W - 4   // word address width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  mem_req_t          req,
  output logic              req_ready,
  output logic              mem_en,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [127:0]      mem_wdata,
  input  logic [127:0]      mem_rdata,
  output logic              rsp_valid,
  output logic              rsp_sop,
  output logic [127:0]      rsp_data
);
  logic              busy;
  logic [LEN_W-1:0]  left;
  logic [ADDR_W-1:0] raddr;
  logic              hdr_v, data_v;
  mem_hdr_t          hdr;
  logic              accept;

  assign req_ready = !busy;
  assign accept    = req_valid && req_ready;

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = MEM_AW'(raddr >> 4);
    mem_wdata = req.data;
    if (busy) begin
      mem_en = 1'b1;
    end else if (accept && req.wr) begin
      mem_en   = 1'b1;
      mem_we   = 1'b1;
      mem_addr = MEM_AW'(req.addr >> 4);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      left   <= '0;
      raddr  <= '0;
      hdr_v  <= 1'b0;
      data_v <= 1'b0;
      hdr    <= '0;
    end else begin
      hdr_v  <= 1'b0;
      data_v <= busy;
      if (accept && !req.wr && req.len != 0) begin
        busy      <= 1'b1;
        left      <= req.len;
        raddr     <= req.addr;
        hdr_v     <= 1'b1;
        hdr       <= '0;
        hdr.tag   <= req.tag;
        hdr.len   <= req.len;
        hdr.addr  <= req.addr;
      end else if (busy) begin
        raddr <= raddr + ADDR_W'(BEAT_BYTES);
        left  <= left - 1'b1;
        if (left == LEN_W'(1)) busy <= 1'b0;
      end
    end
  end

  assign rsp_valid = hdr_v | data_v;
  assign rsp_sop   = hdr_v;
  assign rsp_data  = hdr_v ? 128'(hdr) : mem_rdata;

  assert property (@(posedge clk) disable iff (!rst_n) !(hdr_v && data_v));
endmodule
