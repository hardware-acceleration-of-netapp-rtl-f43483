// alg_addr_counter: address bookkeeping of one algorithm data requestor.
//
// rd_addr is the lowest local-memory address whose data has not yet been
// requested for the algorithm buffer; it advances by REQ_BYTES (64) each time
// a request is sent. fill_addr counts how far host data has been written into
// local memory: every 16-byte host data burst written advances it by 16.
// `avail` is high when at least one whole request of host data lies beyond
// rd_addr, so a request never overtakes the host's writes. Both counters are
// loaded with `base` on `load`. The two counters and the rule follow the
// description; assuming host data lands in order from `base` is this design's.
module alg_addr_counter
  import anchor_pkg::*;
#(
  parameter int unsigned REQ_BYTES = anchor_pkg::REQ_SIZE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] base,
  input  logic              host_wr,     // one 16-byte host data burst written
  input  logic              advance,     // one request sent
  output logic [ADDR_W-1:0] rd_addr,
  output logic [ADDR_W-1:0] fill_addr,
  output logic              avail
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr   <= '0;
      fill_addr <= '0;
    end else if (load) begin
      rd_addr   <= base;
      fill_addr <= base;
    end else begin
      if (advance) rd_addr   <= rd_addr + ADDR_W'(REQ_BYTES);
      if (host_wr) fill_addr <= fill_addr + ADDR_W'(BEAT_BYTES);
    end
  end

  assign avail = (fill_addr - rd_addr) >= ADDR_W'(REQ_BYTES);
endmodule
