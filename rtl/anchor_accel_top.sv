// anchor_accel_top: card-side logic of the anchor-detect accelerator.
//
// The host writes descriptors into the memory mapped registers; the DMA
// engine copies the data to be scanned from host memory into local memory.
// Two algorithm data requestors read that data back, 64 bytes at a time,
// through the memory arbiter; the tag checker steers the returned bursts into
// algorithm buffer 1 (bytes entering the window) or buffer 2 (the same stream,
// for bytes leaving it), while the Tx format module drops them instead of
// sending them to the host. Once ALG_GO is set, the feed control hands the
// algorithm one byte per clock from buffer 1, joined by buffer 2 after the
// first 4093 bytes. Anchors go through the anchor write requestor into local
// memory, where the host fetches them with a DMA write descriptor.
//
// Memory arbiter inputs, all of equal priority: 0 DMA memory writes, 1 DMA
// memory reads, 2 requestor of buffer 1, 3 requestor of buffer 2, 4 anchor
// writes.
//
// Ports: the PCI-E core and the DDR2 controller with its DIMMs are outside
// this design. In their place the top has a register write/read port (mmr_*),
// a read-request port to the host (hrq_*), a completion port from the host
// (cpl_*, 64 bytes per tag as four consecutive 16-byte beats), a host write
// port (hwr_*, assumed always ready) and a synchronous 128-bit local memory
// port (mem_*, read data one clock after mem_en). irq asks the PCI-E core
// for an interrupt packet; ALG_GO_RESET=1 starts the algorithm without a
// register write, as soon as data arrives.
module anchor_accel_top
  import anchor_pkg::*;
#(
  parameter int unsigned WINDOW  = anchor_pkg::WINDOW_LEN,
  parameter int unsigned LANES   = 16,   // byte FIFOs per algorithm buffer
  parameter int unsigned DEPTH   = 16,   // entries per byte FIFO
  parameter int unsigned MEM_AW  = 24,   // local memory word address bits (16 B words)
  parameter bit          ALG_GO_RESET = 1'b0  // 1: algorithm enabled by default
) (
  input  logic              clk,
  input  logic              rst_n,
  // memory mapped registers
  input  logic              mmr_wr,
  input  logic [7:0]        mmr_addr,
  input  logic [63:0]       mmr_wdata,
  input  logic [7:0]        mmr_rd_addr,
  output logic [63:0]       mmr_rdata,
  // read requests to host memory
  output logic              hrq_valid,
  output logic [TAG_W-1:0]  hrq_tag,
  output logic [ADDR_W-1:0] hrq_addr,
  output logic [15:0]       hrq_len,
  input  logic              hrq_ready,
  // completions from host memory
  input  logic              cpl_valid,
  input  logic [TAG_W-1:0]  cpl_tag,
  input  logic [127:0]      cpl_data,
  output logic              cpl_ready,
  // writes to host memory
  output logic              hwr_valid,
  output logic [ADDR_W-1:0] hwr_addr,
  output logic [127:0]      hwr_data,
  output logic              hwr_last,
  // local memory
  output logic              mem_en,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [127:0]      mem_wdata,
  input  logic [127:0]      mem_rdata,
  // anchor indication
  output logic              anchor_found,
  output logic              irq           // interrupt request to the host (error)
);
  localparam int unsigned NREQ  = 5;
  localparam int unsigned CNT_W = 48;

  // ---- registers -----------------------------------------------------------
  logic              dma_en, alg_go, alg_load, anchor_load;
  logic [63:0]       mask;
  logic [ADDR_W-1:0] alg_base, anchor_base;
  logic              desc_valid, desc_ready;
  dma_desc_t         desc;
  logic [CNT_W-1:0]  result_count;
  logic [31:0]       anchors_written;

  mmr_regs #(.ALG_GO_RESET(ALG_GO_RESET)) u_mmr (
    .clk, .rst_n,
    .wr(mmr_wr), .addr(mmr_addr), .wdata(mmr_wdata),
    .rd_addr(mmr_rd_addr), .rdata(mmr_rdata),
    .dma_en, .alg_go, .mask, .alg_load, .alg_base, .anchor_load, .anchor_base,
    .desc_valid, .desc, .desc_ready,
    .results(64'(result_count)), .anchors(anchors_written), .irq
  );

  // ---- DMA engine and tag manager -------------------------------------------
  logic             rd_avail, wr_avail, rd_alloc, wr_alloc, rd_free, wr_free;
  logic [TAG_W-1:0] rd_tag, wr_tag, lk0_tag, lk1_tag, rd_free_tag, wr_free_tag;
  tag_entry_t       rd_entry, wr_entry, lk0_entry, lk1_entry;
  logic [3:0]       rd_busy, wr_busy;

  logic [NREQ-1:0]  arb_valid, arb_gnt;
  mem_req_t         arb_reqs [NREQ];
  logic             dma_busy;

  tag_manager #(.NRD(4), .NWR(4)) u_tags (
    .clk, .rst_n,
    .rd_avail, .rd_tag, .rd_alloc, .rd_entry,
    .wr_avail, .wr_tag, .wr_alloc, .wr_entry,
    .lk0_tag, .lk0_entry, .lk1_tag, .lk1_entry,
    .rd_free, .rd_free_tag, .wr_free, .wr_free_tag,
    .rd_busy, .wr_busy
  );

  dma_engine #(.CHUNK(64)) u_dma (
    .clk, .rst_n, .enable(dma_en),
    .desc_valid, .desc, .desc_ready,
    .rd_avail, .rd_tag, .rd_alloc, .rd_entry,
    .wr_avail, .wr_tag, .wr_alloc, .wr_entry,
    .lk_tag(lk0_tag), .lk_entry(lk0_entry),
    .rd_free, .rd_free_tag,
    .hrq_valid, .hrq_tag, .hrq_addr, .hrq_len, .hrq_ready,
    .cpl_valid, .cpl_tag, .cpl_data, .cpl_ready,
    .mw_valid(arb_valid[0]), .mw_req(arb_reqs[0]), .mw_gnt(arb_gnt[0]),
    .mr_valid(arb_valid[1]), .mr_req(arb_reqs[1]), .mr_gnt(arb_gnt[1]),
    .busy(dma_busy)
  );

  // a 16-byte burst of host data has been written to local memory
  logic host_wr;
  assign host_wr = arb_gnt[0];

  // ---- memory arbiter and memory controller interface -----------------------------
  logic     mc_valid, mc_ready;
  mem_req_t mc_req;
  logic     rsp_valid, rsp_sop;
  logic [127:0] rsp_data;

  mem_arbiter #(.N(NREQ)) u_arb (
    .clk, .rst_n,
    .req_valid(arb_valid), .reqs(arb_reqs), .gnt(arb_gnt),
    .out_valid(mc_valid), .out_req(mc_req), .out_ready(mc_ready)
  );

  mem_ctrl_if #(.MEM_AW(MEM_AW)) u_mc (
    .clk, .rst_n,
    .req_valid(mc_valid), .req(mc_req), .req_ready(mc_ready),
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .rsp_valid, .rsp_sop, .rsp_data
  );

  // ---- read-back routing ------------------------------------------------------
  logic [1:0]   buf_wr;
  logic [127:0] buf_data;
  logic         discard;

  tag_checker #(.NBUF(2), .REQ_BEATS(REQ_BURSTS)) u_tagchk (
    .clk, .rst_n, .rsp_valid, .rsp_sop, .rsp_data, .buf_wr, .buf_data
  );

  tx_format #(.NWR(4), .NBUF(2)) u_tx (
    .clk, .rst_n, .rsp_valid, .rsp_sop, .rsp_data,
    .lk_tag(lk1_tag), .lk_entry(lk1_entry),
    .hwr_valid, .hwr_addr, .hwr_data, .hwr_last,
    .free(wr_free), .free_tag(wr_free_tag), .discard
  );

  // ---- algorithm buffers and their requestors -------------------------------------
  localparam int unsigned CW = $clog2(LANES * DEPTH) + 1;

  logic [1:0]    b_valid, b_rd, b_need, b_blocked;
  logic [7:0]    b_data [2];
  logic [CW-1:0] b_count [2], b_waiting [2];
  logic [2:0]    b_pending [2];

  for (genvar i = 0; i < 2; i++) begin : g_buf
    alg_buffer #(.LANES(LANES), .DEPTH(DEPTH), .REQ_BYTES(REQ_SIZE)) u_buf (
      .clk, .rst_n,
      .wr_valid(buf_wr[i]), .wr_data(buf_data[8*LANES-1:0]),
      .rd_en(b_rd[i]), .rd_valid(b_valid[i]), .rd_data(b_data[i]),
      .need_data(b_need[i]), .count(b_count[i]), .waiting(b_waiting[i])
    );

    alg_data_requestor #(.TAG(ALG_TAG_BASE + TAG_W'(i)), .MAX_PENDING(4),
                         .REQ_BYTES(REQ_SIZE)) u_req (
      .clk, .rst_n, .load(alg_load), .base(alg_base), .host_wr,
      .need_data(b_need[i]),
      .req_valid(arb_valid[2+i]), .req(arb_reqs[2+i]), .req_ready(arb_gnt[2+i]),
      .pending(b_pending[i]), .blocked(b_blocked[i])
    );
  end

  // ---- feed control, algorithm, anchor writes -----------------------------------
  logic             stall, warm, starved;
  logic [CNT_W-1:0] out_count;
  logic             res_valid, anchor_valid;
  logic [CNT_W-1:0] res_offset, anchor_offset;
  logic [63:0]      res_hash, anchor_value;

  alg_feed_ctrl #(.WINDOW(WINDOW), .CNT_W(CNT_W)) u_feed (
    .clk, .rst_n, .clear(alg_load), .go(alg_go), .stall,
    .b1_valid(b_valid[0]), .b2_valid(b_valid[1]),
    .b1_rd(b_rd[0]), .b2_rd(b_rd[1]), .warm, .starved, .out_count
  );

  anchor_algorithm #(.WINDOW(WINDOW), .CNT_W(CNT_W)) u_alg (
    .clk, .rst_n, .clear(alg_load), .mask,
    .in_valid(b_rd[0]), .in_byte(b_data[0]),
    .exit_valid(b_rd[1]), .exit_byte(b_data[1]),
    .res_valid, .res_offset, .res_hash,
    .anchor_valid, .anchor_offset, .anchor_value, .result_count
  );

  anchor_write_req #(.QDEPTH(8), .STALL_MARGIN(3), .CNT_W(CNT_W)) u_anchor (
    .clk, .rst_n, .load(anchor_load), .base(anchor_base),
    .anchor_valid, .anchor_offset, .anchor_value,
    .req_valid(arb_valid[4]), .req(arb_reqs[4]), .req_ready(arb_gnt[4]),
    .stall, .anchors_written
  );

  assign anchor_found = anchor_valid;
endmodule
