// tx_format: builds host write packets from data read out of local memory
// (the card-to-host half of a DMA write), modified to drop algorithm data.
//
// On a response header whose tag is a DMA write tag, it looks up the host
// address of that tag in the tag manager and then emits each following data
// beat as a host write (hwr_valid, hwr_addr, hwr_data), advancing the address
// by 16 per beat; with the last beat (hwr_last) the tag is freed. A header
// with an algorithm buffer tag is recognised and its data discarded (counted
// by `discard`) instead of being written to the host. The host write path is
// assumed always ready. Tag recognition and discard follow the description;
// the packet fields are this design's simplification of a PCI-E write.
module tx_format
  import anchor_pkg::*;
#(
  parameter int unsigned NWR  = 4,
  parameter int unsigned NBUF = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rsp_valid,
  input  logic              rsp_sop,
  input  logic [127:0]      rsp_data,
  output logic [TAG_W-1:0]  lk_tag,
  input  tag_entry_t        lk_entry,
  output logic              hwr_valid,
  output logic [ADDR_W-1:0] hwr_addr,
  output logic [127:0]      hwr_data,
  output logic              hwr_last,
  output logic              free,
  output logic [TAG_W-1:0]  free_tag,
  output logic              discard
);
  typedef enum logic [1:0] {IDLE, TO_HOST, DROP} mode_e;

  mode_e             mode;
  mem_hdr_t          hdr;
  logic [LEN_W-1:0]  left;
  logic [ADDR_W-1:0] haddr;
  logic [TAG_W-1:0]  cur_tag;
  logic              is_wr_tag, is_alg_tag;

  assign hdr        = mem_hdr_t'(rsp_data);
  assign lk_tag     = hdr.tag;
  assign is_wr_tag  = (hdr.tag >= DMA_WR_TAG_BASE) && (hdr.tag < DMA_WR_TAG_BASE + TAG_W'(NWR));
  assign is_alg_tag = (hdr.tag >= ALG_TAG_BASE) && (hdr.tag < ALG_TAG_BASE + TAG_W'(NBUF));

  logic data_beat;
  assign data_beat = rsp_valid && !rsp_sop && (left != 0);

  assign hwr_valid = data_beat && (mode == TO_HOST);
  assign hwr_addr  = haddr;
  assign hwr_data  = rsp_data;
  assign hwr_last  = hwr_valid && (left == LEN_W'(1));
  assign free      = hwr_last;
  assign free_tag  = cur_tag;
  assign discard   = data_beat && (mode == DROP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode    <= IDLE;
      left    <= '0;
      haddr   <= '0;
      cur_tag <= '0;
    end else if (rsp_valid && rsp_sop) begin
      left    <= hdr.len;
      cur_tag <= hdr.tag;
      haddr   <= lk_entry.host_addr;
      mode    <= is_wr_tag ? TO_HOST : (is_alg_tag ? DROP : IDLE);
    end else if (data_beat) begin
      left  <= left - 1'b1;
      haddr <= haddr + ADDR_W'(BEAT_BYTES);
      if (left == LEN_W'(1)) mode <= IDLE;
    end
  end
endmodule
