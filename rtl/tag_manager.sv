// tag_manager: hands out transaction tags for the DMA engine and remembers,
// per tag, the host address, local address and length of the transfer.
//
// DMA read (host to card) and DMA write (card to host) transfers use separate
// tag ranges: NRD tags from DMA_RD_TAG_BASE and NWR tags from DMA_WR_TAG_BASE.
// rd_avail/rd_tag (and wr_avail/wr_tag) show the lowest free tag of each
// range; rd_alloc claims it and stores rd_entry. Two lookup ports read the
// entry of any tag combinationally; rd_free/wr_free release a tag once its
// transfer is complete. Separate ranges and per-tag storage follow the
// description; range sizes and numbering are this design's.
module tag_manager
  import anchor_pkg::*;
#(
  parameter int unsigned NRD = 4,
  parameter int unsigned NWR = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // allocation
  output logic             rd_avail,
  output logic [TAG_W-1:0] rd_tag,
  input  logic             rd_alloc,
  input  tag_entry_t       rd_entry,
  output logic             wr_avail,
  output logic [TAG_W-1:0] wr_tag,
  input  logic             wr_alloc,
  input  tag_entry_t       wr_entry,
  // lookup
  input  logic [TAG_W-1:0] lk0_tag,
  output tag_entry_t       lk0_entry,
  input  logic [TAG_W-1:0] lk1_tag,
  output tag_entry_t       lk1_entry,
  // release
  input  logic             rd_free,
  input  logic [TAG_W-1:0] rd_free_tag,
  input  logic             wr_free,
  input  logic [TAG_W-1:0] wr_free_tag,
  output logic [NRD-1:0]   rd_busy,
  output logic [NWR-1:0]   wr_busy
);
  tag_entry_t rd_tab [NRD];
  tag_entry_t wr_tab [NWR];

  always_comb begin
    rd_avail = 1'b0;
    rd_tag   = DMA_RD_TAG_BASE;
    for (int i = NRD - 1; i >= 0; i--) begin
      if (!rd_busy[i]) begin
        rd_avail = 1'b1;
        rd_tag   = DMA_RD_TAG_BASE + TAG_W'(i);
      end
    end
    wr_avail = 1'b0;
    wr_tag   = DMA_WR_TAG_BASE;
    for (int i = NWR - 1; i >= 0; i--) begin
      if (!wr_busy[i]) begin
        wr_avail = 1'b1;
        wr_tag   = DMA_WR_TAG_BASE + TAG_W'(i);
      end
    end
  end

  function automatic tag_entry_t lookup(input logic [TAG_W-1:0] t,
                                        input tag_entry_t rt [NRD],
                                        input tag_entry_t wt [NWR]);
    tag_entry_t e;
    e = '0;
    for (int i = 0; i < NRD; i++) if (t == DMA_RD_TAG_BASE + TAG_W'(i)) e = rt[i];
    for (int i = 0; i < NWR; i++) if (t == DMA_WR_TAG_BASE + TAG_W'(i)) e = wt[i];
    return e;
  endfunction

  assign lk0_entry = lookup(lk0_tag, rd_tab, wr_tab);
  assign lk1_entry = lookup(lk1_tag, rd_tab, wr_tab);

  always_ff @(posedge clk) begin
    for (int i = 0; i < NRD; i++)
      if (rd_alloc && rd_avail && rd_tag == DMA_RD_TAG_BASE + TAG_W'(i)) rd_tab[i] <= rd_entry;
    for (int i = 0; i < NWR; i++)
      if (wr_alloc && wr_avail && wr_tag == DMA_WR_TAG_BASE + TAG_W'(i)) wr_tab[i] <= wr_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy <= '0;
      wr_busy <= '0;
    end else begin
      for (int i = 0; i < NRD; i++) begin
        if (rd_free && rd_free_tag == DMA_RD_TAG_BASE + TAG_W'(i)) rd_busy[i] <= 1'b0;
        if (rd_alloc && rd_avail && rd_tag == DMA_RD_TAG_BASE + TAG_W'(i)) rd_busy[i] <= 1'b1;
      end
      for (int i = 0; i < NWR; i++) begin
        if (wr_free && wr_free_tag == DMA_WR_TAG_BASE + TAG_W'(i)) wr_busy[i] <= 1'b0;
        if (wr_alloc && wr_avail && wr_tag == DMA_WR_TAG_BASE + TAG_W'(i)) wr_busy[i] <= 1'b1;
      end
    end
  end
endmodule
