// mmr_regs: memory mapped registers through which the host controls the card.
//
// Register map (byte offsets, 64-bit registers):
//   0x00 CTRL         rw  bit0 DMA_EN (DMA engines enabled), bit1 ALG_GO,
//                         bit2 IRQ_EN (error interrupt enabled), bit8
//                         descriptor overflow (sticky, write 1 to clear)
//   0x08 DESC_HOST    rw  host address of the next descriptor
//   0x10 DESC_LOCAL   rw  local address of the next descriptor
//   0x18 DESC_LEN     w   writing queues the descriptor: bits 31:0 length in
//                         bytes (multiple of 64), bit 63 direction (0: DMA
//                         read, host to card; 1: DMA write, card to host)
//   0x20 ALG_BASE     rw  local address of the data to scan; writing it
//                         restarts the algorithm address counters and hash
//   0x28 ANCHOR_BASE  rw  local address where anchor records are written;
//                         writing it restarts the anchor record counter
//   0x30 MASK         rw  64-bit anchor mask, resets to the 14-bit default
//   0x38 DESC_PTRS    ro  bits 31:0 head (descriptors taken by the DMA
//                         engine), bits 63:32 tail (descriptors written)
//   0x40 RESULTS      ro  bytes processed by the algorithm
//   0x48 ANCHORS      ro  anchor records written to local memory
// Descriptors wait in a QDEPTH-entry queue; a write to DESC_LEN when the queue
// is full is dropped and sets the sticky overflow bit, CTRL bit 8; while
// IRQ_EN is set, that error raises irq, the request for an interrupt packet to
// the host, until the host clears the bit. ALG_GO comes out of reset as
// ALG_GO_RESET, so the algorithm can be enabled by default and start as soon
// as data arrives, or wait for a register write. The error interrupt and the
// enabled-by-default option follow the description; which errors interrupt is
// this design's choice (the descriptor overflow is the only error here). Host
// control through MMRs, the descriptor contents, ALG_GO and the head/tail
// descriptor pointers follow the description; the addresses and bit positions
// are this design's. Writes take effect on the clock; reads are combinational.
// alg_load and anchor_load pulse for one clock right after ALG_BASE or
// ANCHOR_BASE is written, when the new base is already visible.
module mmr_regs
  import anchor_pkg::*;
#(
  parameter int unsigned QDEPTH       = 4,
  parameter bit          ALG_GO_RESET = 1'b0   // 1: algorithm enabled by default
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr,
  input  logic [7:0]        addr,
  input  logic [63:0]       wdata,
  input  logic [7:0]        rd_addr,
  output logic [63:0]       rdata,
  // control outputs
  output logic              dma_en,
  output logic              alg_go,
  output logic [63:0]       mask,
  output logic              alg_load,
  output logic [ADDR_W-1:0] alg_base,
  output logic              anchor_load,
  output logic [ADDR_W-1:0] anchor_base,
  output logic              desc_valid,
  output dma_desc_t         desc,
  input  logic              desc_ready,
  // status inputs
  input  logic [63:0]       results,
  input  logic [31:0]       anchors,
  output logic              irq
);
  localparam int unsigned QW = $clog2(QDEPTH);

  logic [ADDR_W-1:0] d_host, d_local;
  logic              overflow, irq_en;
  dma_desc_t         q [QDEPTH];
  logic [QW-1:0]     wp, rp;
  logic [QW:0]       cnt;
  logic [31:0]       head, tail;
  logic              push, pop;

  assign push = wr && (addr == 8'h18) && (cnt != (QW+1)'(QDEPTH));
  assign pop  = desc_valid && desc_ready;

  assign desc_valid = (cnt != 0);
  assign desc       = q[rp];

  always_ff @(posedge clk) begin
    if (push) q[wp] <= '{to_host: wdata[63], host_addr: d_host, local_addr: d_local,
                         len: ADDR_W'(wdata[31:0])};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_en <= 1'b0; alg_go <= ALG_GO_RESET; irq_en <= 1'b0; overflow <= 1'b0;
      mask <= DEFAULT_MASK;
      d_host <= '0; d_local <= '0; alg_base <= '0; anchor_base <= '0;
      wp <= '0; rp <= '0; cnt <= '0; head <= '0; tail <= '0;
      alg_load <= 1'b0; anchor_load <= 1'b0;
    end else begin
      // restart pulses, one clock after the base register took its new value
      alg_load    <= wr && (addr == 8'h20);
      anchor_load <= wr && (addr == 8'h28);
      if (wr) begin
        unique case (addr)
          8'h00: begin
            dma_en <= wdata[0]; alg_go <= wdata[1]; irq_en <= wdata[2];
            if (wdata[8]) overflow <= 1'b0;
          end
          8'h08: d_host      <= wdata[ADDR_W-1:0];
          8'h10: d_local     <= wdata[ADDR_W-1:0];
          8'h18: if (!push) overflow <= 1'b1;
          8'h20: alg_base    <= wdata[ADDR_W-1:0];
          8'h28: anchor_base <= wdata[ADDR_W-1:0];
          8'h30: mask        <= wdata;
          default: ;
        endcase
      end
      if (push) begin
        wp   <= (wp == QW'(QDEPTH - 1)) ? '0 : wp + 1'b1;
        tail <= tail + 1'b1;
      end
      if (pop) begin
        rp   <= (rp == QW'(QDEPTH - 1)) ? '0 : rp + 1'b1;
        head <= head + 1'b1;
      end
      cnt <= cnt + (QW+1)'(push) - (QW+1)'(pop);
    end
  end

  assign irq = overflow && irq_en;

  always_comb begin
    unique case (rd_addr)
      8'h00:   rdata = {55'd0, overflow, 5'd0, irq_en, alg_go, dma_en};
      8'h08:   rdata = 64'(d_host);
      8'h10:   rdata = 64'(d_local);
      8'h20:   rdata = 64'(alg_base);
      8'h28:   rdata = 64'(anchor_base);
      8'h30:   rdata = mask;
      8'h38:   rdata = {tail, head};
      8'h40:   rdata = results;
      8'h48:   rdata = 64'(anchors);
      default: rdata = '0;
    endcase
  end
endmodule
