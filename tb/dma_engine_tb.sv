// dma_engine_tb: the DMA engine with a tag manager, a host model and a random
// memory-arbiter grant. DMA read descriptors of random length (multiples of
// 64) must produce 64-byte host read requests whose completions are written,
// burst by burst, to the matching local addresses; DMA write descriptors must
// produce 4-burst local reads with write tags that carry the host address.
// Checks every request and write, that each expected local burst is written
// exactly once, that no more than four read tags are ever in flight, and that
// descriptors are refused while DMA is disabled.
module dma_engine_tb;
  import anchor_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0;
  logic desc_valid = 0, desc_ready;
  dma_desc_t desc;
  logic rd_avail, wr_avail, rd_alloc, wr_alloc, rd_free, wr_free = 0;
  logic [7:0] rd_tag, wr_tag, lk_tag, rd_free_tag, wr_free_tag = 0;
  tag_entry_t rd_entry, wr_entry, lk_entry, lk1_entry;
  logic [3:0] rd_busy, wr_busy;
  logic hrq_valid, hrq_ready = 0;
  logic [7:0] hrq_tag;
  logic [31:0] hrq_addr;
  logic [15:0] hrq_len;
  logic cpl_valid = 0, cpl_ready;
  logic [7:0] cpl_tag = 0;
  logic [127:0] cpl_data = '0;
  logic mw_valid, mr_valid, mw_gnt, mr_gnt, busy;
  mem_req_t mw_req, mr_req;

  dma_engine dut (.*);
  tag_manager u_tags (.clk, .rst_n, .rd_avail, .rd_tag, .rd_alloc, .rd_entry,
    .wr_avail, .wr_tag, .wr_alloc, .wr_entry, .lk0_tag(lk_tag), .lk0_entry(lk_entry),
    .lk1_tag(8'h0), .lk1_entry(lk1_entry), .rd_free, .rd_free_tag, .wr_free, .wr_free_tag,
    .rd_busy, .wr_busy);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask
  function automatic logic [127:0] hdata(logic [31:0] a);
    return {a ^ 32'hDEAD_BEEF, ~a, a * 32'd2654435761, a};
  endfunction

  logic gnt_r = 0;
  assign mw_gnt = mw_valid && gnt_r;
  assign mr_gnt = mr_valid && gnt_r;

  // host: remembers read requests, returns 4 beats each, in order
  typedef struct { logic [7:0] tag; logic [31:0] addr; } hreq_t;
  hreq_t hq [$];
  logic [127:0] exp_local [int];     // expected writes, by local burst address
  int written = 0, host_reads = 0, mem_reads = 0;
  logic [31:0] exp_mr_addr [$];
  int beat = 0;

  always @(posedge clk) if (rst_n) begin
    if (hrq_valid && hrq_ready) begin
      check(hrq_len == 64 && hrq_tag < 4, "host read request");
      hq.push_back('{tag: hrq_tag, addr: hrq_addr});
      host_reads++;
    end
    if (mw_gnt) begin
      check(mw_req.wr && exp_local.exists(int'(mw_req.addr)), "write to expected local address");
      if (exp_local.exists(int'(mw_req.addr))) begin
        check(mw_req.data == exp_local[int'(mw_req.addr)], "written data");
        exp_local.delete(int'(mw_req.addr));
      end
      written++;
    end
    if (mr_gnt) begin
      check(!mr_req.wr && mr_req.len == 4 && mr_req.tag >= 8'h10 && mr_req.tag < 8'h14, "local read");
      check(exp_mr_addr.size() > 0 && mr_req.addr == exp_mr_addr[0], "local read address");
      check(wr_entry.host_addr == 32'h9000_0000 + (mr_req.addr - 32'h2000), "write tag host address");
      void'(exp_mr_addr.pop_front());
      mem_reads++;
    end
  end

  // completion driver
  always @(negedge clk) if (rst_n) begin
    gnt_r     = ($urandom_range(0, 2) != 0);
    hrq_ready = ($urandom_range(0, 3) != 0);
    if (cpl_valid && cpl_ready_seen) begin
      beat++;
      if (beat == 4) begin beat = 0; void'(hq.pop_front()); end
    end
    cpl_valid = (hq.size() > 0);
    if (cpl_valid) begin
      cpl_tag  = hq[0].tag;
      cpl_data = hdata(hq[0].addr + 32'(16 * beat));
    end
    // the Tx format module frees write tags; do it here at random
    wr_free = 0;
    if (wr_busy != 0 && $urandom_range(0, 3) == 0) begin
      for (int i = 0; i < 4; i++) if (wr_busy[i]) wr_free_tag = 8'h10 + 8'(i);
      wr_free = 1;
    end
  end
  logic cpl_ready_seen = 0;
  always @(posedge clk) cpl_ready_seen <= cpl_valid && cpl_ready;

  task automatic put(bit to_host, logic [31:0] h, logic [31:0] l, logic [31:0] len);
    @(negedge clk);
    desc = '{to_host: to_host, host_addr: h, local_addr: l, len: len};
    desc_valid = 1;
    do @(posedge clk); while (!desc_ready);
    @(negedge clk);
    desc_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // disabled: the descriptor is not taken
    @(negedge clk); desc = '{to_host: 0, host_addr: 0, local_addr: 0, len: 64}; desc_valid = 1;
    repeat (5) begin @(posedge clk); check(!desc_ready, "refused while disabled"); end
    @(negedge clk); desc_valid = 0; enable = 1;
    begin
      logic [31:0] l;
      l = 0;
      for (int d = 0; d < 12; d++) begin
        int len;
        len = 64 * $urandom_range(1, 6);
        for (int k = 0; k < len; k += 16) exp_local[int'(l) + k] = hdata(32'h4000_0000 + l + 32'(k));
        put(0, 32'h4000_0000 + l, l, 32'(len));
        l += 32'(len);
      end
    end
    for (int d = 0; d < 3; d++) begin
      for (int k = 0; k < 128; k += 64) exp_mr_addr.push_back(32'h2000 + 32'(d * 128 + k));
      put(1, 32'h9000_0000 + 32'(d * 128), 32'h2000 + 32'(d * 128), 128);
    end
    repeat (400) @(negedge clk);
    check(exp_local.size() == 0 && exp_mr_addr.size() == 0, "all transfers done");
    check(rd_busy == 0, "read tags released");
    $display("host reads %0d bursts written %0d local reads %0d", host_reads, written, mem_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
