// dma_engine: moves data between host memory and card local memory as
// directed by descriptors the host writes into the memory mapped registers.
//
// A DMA read descriptor (host to card) is split into CHUNK-byte (64) pieces.
// For each piece the engine takes a free read tag, stores the local address in
// the tag manager and sends a read request to the host (hrq_*). Completion
// data from the host (cpl_*, CHUNK/16 beats of one tag back to back) is
// matched to its local address through the tag and written to local memory
// one 16-byte burst at a time through the memory arbiter (mw_*); the tag is
// freed after its last burst. A DMA write descriptor (card to host) is split
// the same way: for each piece a write tag holding the host address is taken
// and a local-memory read is sent to the arbiter (mr_*); the Tx format module
// turns the returned data into host writes and frees the tag. Descriptors are
// processed one at a time, only while `enable` is high. This follows the
// description; the request and completion signals stand in for PCI-E packets.
module dma_engine
  import anchor_pkg::*;
#(
  parameter int unsigned CHUNK = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  // descriptors
  input  logic              desc_valid,
  input  dma_desc_t         desc,
  output logic              desc_ready,
  // tag manager
  input  logic              rd_avail,
  input  logic [TAG_W-1:0]  rd_tag,
  output logic              rd_alloc,
  output tag_entry_t        rd_entry,
  input  logic              wr_avail,
  input  logic [TAG_W-1:0]  wr_tag,
  output logic              wr_alloc,
  output tag_entry_t        wr_entry,
  output logic [TAG_W-1:0]  lk_tag,
  input  tag_entry_t        lk_entry,
  output logic              rd_free,
  output logic [TAG_W-1:0]  rd_free_tag,
  // read requests to the host
  output logic              hrq_valid,
  output logic [TAG_W-1:0]  hrq_tag,
  output logic [ADDR_W-1:0] hrq_addr,
  output logic [15:0]       hrq_len,
  input  logic              hrq_ready,
  // completions from the host
  input  logic              cpl_valid,
  input  logic [TAG_W-1:0]  cpl_tag,
  input  logic [127:0]      cpl_data,
  output logic              cpl_ready,
  // local memory requests
  output logic              mw_valid,
  output mem_req_t          mw_req,
  input  logic              mw_gnt,
  output logic              mr_valid,
  output mem_req_t          mr_req,
  input  logic              mr_gnt,
  output logic              busy
);
  localparam int unsigned BEATS = CHUNK / BEAT_BYTES;
  localparam int unsigned BW    = $clog2(BEATS);

  logic              active, to_host;
  logic [ADDR_W-1:0] h_addr, l_addr, remain;

  assign desc_ready = enable && !active;
  assign busy       = active;

  // ---- issue side --------------------------------------------------------
  logic issue;
  assign hrq_valid = active && !to_host && rd_avail;
  assign hrq_tag   = rd_tag;
  assign hrq_addr  = h_addr;
  assign hrq_len   = 16'(CHUNK);
  assign rd_alloc  = hrq_valid && hrq_ready;
  assign rd_entry  = '{host_addr: h_addr, local_addr: l_addr, len: LEN_W'(BEATS)};

  assign mr_valid  = active && to_host && wr_avail;
  always_comb begin
    mr_req      = '0;
    mr_req.wr   = 1'b0;
    mr_req.tag  = wr_tag;
    mr_req.len  = LEN_W'(BEATS);
    mr_req.addr = l_addr;
  end
  assign wr_alloc = mr_valid && mr_gnt;
  assign wr_entry = '{host_addr: h_addr, local_addr: l_addr, len: LEN_W'(BEATS)};

  assign issue = rd_alloc || wr_alloc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      to_host <= 1'b0;
      h_addr  <= '0;
      l_addr  <= '0;
      remain  <= '0;
    end else if (desc_valid && desc_ready) begin
      active  <= (desc.len >= ADDR_W'(CHUNK));
      to_host <= desc.to_host;
      h_addr  <= desc.host_addr;
      l_addr  <= desc.local_addr;
      remain  <= desc.len;
    end else if (issue) begin
      h_addr <= h_addr + ADDR_W'(CHUNK);
      l_addr <= l_addr + ADDR_W'(CHUNK);
      remain <= remain - ADDR_W'(CHUNK);
      if (remain < ADDR_W'(2 * CHUNK)) active <= 1'b0;
    end
  end

  // ---- completion side ---------------------------------------------------
  logic [BW-1:0] beat;
  assign lk_tag    = cpl_tag;
  assign mw_valid  = cpl_valid;
  assign cpl_ready = mw_gnt;
  always_comb begin
    mw_req      = '0;
    mw_req.wr   = 1'b1;
    mw_req.tag  = cpl_tag;
    mw_req.len  = LEN_W'(1);
    mw_req.addr = lk_entry.local_addr + ADDR_W'({beat, 4'b0000});
    mw_req.data = cpl_data;
  end
  assign rd_free     = mw_gnt && (beat == BW'(BEATS - 1));
  assign rd_free_tag = cpl_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      beat <= '0;
    else if (mw_gnt) beat <= beat + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (desc_valid && desc_ready) |-> (desc.len % CHUNK == 0));
endmodule
