// accel_env: end-to-end test environment for anchor_accel_top (at its
// default parameters). It plays the host: it writes the registers, queues
// DMA read descriptors of 128 bytes each to copy NBYTES of random data into
// local memory at 0, answers the card's read requests from its own memory
// (LAT clocks later, one 16-byte beat per clock; HOST_GAP idle clocks between
// descriptors once the algorithm runs), sets ALG_GO either before
// the data is loaded (GO_EARLY) or after, waits for every byte to be
// processed, and finally copies the anchor records back with a DMA write
// descriptor. With ALG_AUTO the card is built with ALG_GO set from reset
// and the host never writes ALG_GO: the algorithm starts as data arrives.
// At the end the host queues descriptors with the DMA engine off until the
// descriptor queue overflows, and checks the error interrupt and its clearing.
// A behavioural memory model stands in for the DIMMs.
//
// Checks: every anchor record (offset and unmasked hash) against a reference
// rolled independently here, the anchor count, the result count, the
// data copied into local memory, and the algorithm rate once data is there.
// It counts how often each mechanism of the design happened and counts a
// failure for any that never did (REQUIRE_ALL); the list is printed.
module accel_env
  import anchor_pkg::*;
#(
  parameter int unsigned NBYTES      = 65536,
  parameter logic [63:0] MASK        = DEFAULT_MASK,
  parameter bit          GO_EARLY    = 1'b0,
  parameter bit          ALG_AUTO    = 1'b0,   // algorithm enabled from reset
  parameter bit          REQUIRE_ALL = 1'b1,
  parameter int unsigned LAT         = 20,
  parameter int unsigned HOST_GAP    = 0,      // idle clocks between descriptors after ALG_GO
  parameter longint      WATCHDOG    = 2_000_000
) ();
  localparam logic [31:0] ANCHOR_BASE = 32'h0001_0000;
  localparam logic [31:0] HOST_ANCHOR = 32'h8000_0000;

  logic clk = 0, rst_n = 0;
  logic mmr_wr = 0;
  logic [7:0] mmr_addr = 0, mmr_rd_addr = 0;
  logic [63:0] mmr_wdata = 0, mmr_rdata;
  logic hrq_valid, hrq_ready = 1;
  logic [7:0] hrq_tag;
  logic [31:0] hrq_addr;
  logic [15:0] hrq_len;
  logic cpl_valid = 0, cpl_ready;
  logic [7:0] cpl_tag = 0;
  logic [127:0] cpl_data = '0;
  logic hwr_valid, hwr_last;
  logic [31:0] hwr_addr;
  logic [127:0] hwr_data;
  logic mem_en, mem_we;
  logic [23:0] mem_addr;
  logic [127:0] mem_wdata, mem_rdata;
  logic anchor_found, irq;

  // internal signals observed for the mechanism counters and checks
  logic        p_alg_go, p_arb_gnt2, p_discard, p_dma_busy, p_rd_avail, p_stall, p_starved;
  logic [4:0]  p_arb_valid;
  logic [31:0] p_arb_addr2, p_fill;
  logic [1:0]  p_b_blocked, p_b_rd, p_buf_wr;
  logic [8:0]  p_b_count0;
  logic [7:0]  p_b_data [2];
  logic [2:0]  p_b_pending [2];
  logic [47:0] p_out_count;
`define ACCEL_PROBES(D) \
    assign p_alg_go = D.alg_go;           assign p_arb_gnt2 = D.arb_gnt[2]; \
    assign p_discard = D.discard;         assign p_dma_busy = D.dma_busy; \
    assign p_rd_avail = D.rd_avail;       assign p_stall = D.stall; \
    assign p_starved = D.starved;         assign p_arb_valid = D.arb_valid; \
    assign p_arb_addr2 = D.arb_reqs[2].addr; \
    assign p_fill = D.g_buf[0].u_req.fill_addr; \
    assign p_b_blocked = D.b_blocked;     assign p_b_rd = D.b_rd; \
    assign p_buf_wr = D.buf_wr;           assign p_b_count0 = 9'(D.b_count[0]); \
    assign p_b_data = D.b_data;           assign p_b_pending = D.b_pending; \
    assign p_out_count = 48'(D.out_count);

  // the card built with the algorithm enabled from reset, or at its defaults
  if (ALG_AUTO) begin : g_auto
    anchor_accel_top #(.ALG_GO_RESET(1'b1)) dut (.*);
    `ACCEL_PROBES(dut)
  end else begin : g_dflt
    anchor_accel_top dut (.*);
    `ACCEL_PROBES(dut)
  end
  ddr_mem_model #(.AW(24), .WORDS(16384)) u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
                                               .wdata(mem_wdata), .rdata(mem_rdata));

  always #4 clk = ~clk;   // 125 MHz

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  // ---- host memory -----------------------------------------------------------
  logic [7:0] data [NBYTES];
  function automatic logic [127:0] host_beat(logic [31:0] a);
    logic [127:0] v;
    for (int b = 0; b < 16; b++) v[8*b +: 8] = data[(a + 32'(b)) % NBYTES];
    return v;
  endfunction

  // host answers read requests after LAT clocks, 4 beats per 64-byte request
  typedef struct { longint due; logic [7:0] tag; logic [31:0] addr; } hreq_t;
  hreq_t hq [$];
  longint cyc = 0;
  int beat = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && hrq_valid && hrq_ready) hq.push_back('{due: cyc + LAT, tag: hrq_tag, addr: hrq_addr});
    if (cpl_valid && cpl_ready) begin
      beat = beat + 1;
      if (beat == 4) begin beat = 0; void'(hq.pop_front()); end
    end
  end
  always @(negedge clk) begin
    cpl_valid = (hq.size() > 0) && (hq[0].due <= cyc);
    if (hq.size() > 0) begin
      cpl_tag  = hq[0].tag;
      cpl_data = host_beat(hq[0].addr + 32'(16 * beat));
    end
  end

  // host memory receiving card writes
  logic [127:0] host_rx [longint];
  always @(posedge clk) if (hwr_valid) host_rx[longint'(hwr_addr)] = hwr_data;

  // ---- register access -------------------------------------------------------
  task automatic mmr_write(logic [7:0] a, logic [63:0] d);
    @(negedge clk); mmr_wr = 1; mmr_addr = a; mmr_wdata = d;
    @(negedge clk); mmr_wr = 0;
  endtask
  task automatic mmr_read(logic [7:0] a, output logic [63:0] d);
    @(negedge clk); mmr_rd_addr = a; #1 d = mmr_rdata;
  endtask
  task automatic put_desc(bit to_host, logic [31:0] h, logic [31:0] l, logic [31:0] len);
    logic [63:0] p;
    do mmr_read(8'h38, p); while (p[63:32] - p[31:0] >= 4);   // queue full: wait
    mmr_write(8'h08, 64'(h));
    mmr_write(8'h10, 64'(l));
    mmr_write(8'h18, {to_host, 31'd0, len});
  endtask

  // ---- reference -------------------------------------------------------------
  typedef struct { longint off; logic [63:0] val; } anchor_t;
  anchor_t ref_anchors [$];
  task automatic compute_reference();
    logic [63:0] h [3];
    int unsigned w [3];
    w = '{LANE_W0, LANE_W1, LANE_W2};
    h = '{64'd0, 64'd0, 64'd0};
    for (int t = 0; t < int'(NBYTES); t++) begin
      logic [63:0] x;
      for (int l = 0; l < 3; l++) begin
        h[l] = rotl_w(h[l], 1, w[l]) ^ input_lut(l, data[t], w[l]);
        if (t >= int'(WINDOW_LEN)) h[l] ^= exit_lut(l, data[t - WINDOW_LEN], w[l], WINDOW_LEN);
      end
      x = h[0] ^ h[1] ^ h[2];
      if ((x & MASK) == MASK) ref_anchors.push_back('{off: t, val: x});
    end
  endtask

  // ---- mechanism counters ----------------------------------------------------
  localparam int NM = 16;
  string mname [NM] = '{
    "buffers filled before ALG_GO", "buffer 1 alone (window filling)",
    "both buffers feed (window full)", "algorithm starved of data",
    "requestor caught up with host writes", "four requests outstanding",
    "arbiter contention", "tag checker forwards to buffer 1",
    "tag checker forwards to buffer 2", "Tx format discards algorithm data",
    "anchor found", "anchor queue stall", "DMA read tags all in use",
    "host writes (card to host DMA)", "descriptor overflow interrupt",
    "algorithm enabled from reset"};
  longint mcount [NM];
  initial foreach (mcount[i]) mcount[i] = 0;
  always @(posedge clk) if (rst_n) begin
    if (!p_alg_go && p_b_count0 == 256) mcount[0]++;
    if (p_b_rd[0] && !p_b_rd[1]) mcount[1]++;
    if (p_b_rd[1]) mcount[2]++;
    if (p_starved && p_out_count < NBYTES) mcount[3]++;
    if (p_b_blocked[0] && p_alg_go && p_out_count < NBYTES - 256) mcount[4]++;
    if (p_b_pending[0] == 4 || p_b_pending[1] == 4) mcount[5]++;
    if ($countones(p_arb_valid) > 1) mcount[6]++;
    if (p_buf_wr[0]) mcount[7]++;
    if (p_buf_wr[1]) mcount[8]++;
    if (p_discard) mcount[9]++;
    if (anchor_found) mcount[10]++;
    if (p_stall && p_alg_go) mcount[11]++;
    if (p_dma_busy && !p_rd_avail) mcount[12]++;
    if (hwr_valid) mcount[13]++;
  end
  // bytes handed to the algorithm are the data stream and its copy 4093 bytes back
  always @(posedge clk) if (rst_n) begin
    if (p_b_rd[0]) check(p_b_data[0] == data[p_out_count % NBYTES], "entering byte");
    if (p_b_rd[1]) check(p_b_data[1] == data[(p_out_count - WINDOW_LEN) % NBYTES], "leaving byte");
  end
  // every byte the algorithm takes must have been written to local memory
  always @(posedge clk) if (rst_n && p_arb_gnt2)
    check(p_arb_addr2 + 64 <= p_fill, "read only host-written data");

  // ---- the run ---------------------------------------------------------------
  longint t_go, t_done;
  initial begin
    logic [63:0] v;
    int n_anchor, rec_bytes;
    for (int i = 0; i < int'(NBYTES); i++) data[i] = 8'($urandom);
    compute_reference();
    repeat (3) @(negedge clk);
    rst_n = 1;
    mmr_write(8'h30, MASK);
    mmr_write(8'h20, 64'h0);
    mmr_write(8'h28, 64'(ANCHOR_BASE));
    if (ALG_AUTO) begin
      // ALG_GO is already set: the host only turns the DMA engine on
      mmr_read(8'h00, v);
      check(v[1] == 1'b1, "ALG_GO set from reset");
      if (v[1]) mcount[15]++;
      mmr_write(8'h00, 64'h3);
      t_go = cyc;
      for (int k = 0; k < int'(NBYTES / 128); k++) begin
        put_desc(0, 32'(k * 128), 32'(k * 128), 128);
        repeat (HOST_GAP) @(negedge clk);
      end
    end else if (GO_EARLY) begin
      mmr_write(8'h00, 64'h1);                     // DMA on, algorithm off
      for (int k = 0; k < 4; k++) put_desc(0, 32'(k * 128), 32'(k * 128), 128);
      repeat (200) @(negedge clk);                 // buffers fill while ALG_GO is low
      mmr_write(8'h00, 64'h3);
      t_go = cyc;
      for (int k = 4; k < int'(NBYTES / 128); k++) begin
        put_desc(0, 32'(k * 128), 32'(k * 128), 128);
        repeat (HOST_GAP) @(negedge clk);
      end
    end else begin
      mmr_write(8'h00, 64'h1);                     // DMA on, algorithm off
      for (int k = 0; k < int'(NBYTES / 128); k++) put_desc(0, 32'(k * 128), 32'(k * 128), 128);
      do mmr_read(8'h38, v); while (v[63:32] != v[31:0] || p_dma_busy || hq.size() > 0);
      repeat (50) @(negedge clk);
      mmr_write(8'h00, 64'h3);
      t_go = cyc;
    end
    do mmr_read(8'h40, v); while (v < 64'(NBYTES));
    t_done = cyc;
    check(v == 64'(NBYTES), "every byte processed once");
    repeat (50) @(negedge clk);
    mmr_read(8'h48, v);
    n_anchor = int'(v);
    check(n_anchor == ref_anchors.size(), "anchor count");
    // local memory holds the host data
    for (int a = 0; a < int'(NBYTES); a += 16 * 61)
      begin
        check(u_mem.mem[a / 16] == host_beat(32'(a)), "host data in local memory");
      end
    // fetch anchor records
    rec_bytes = ((n_anchor * 16 + 63) / 64) * 64;
    if (rec_bytes > 0) put_desc(1, HOST_ANCHOR, ANCHOR_BASE, 32'(rec_bytes));
    repeat (100 + rec_bytes) @(negedge clk);
    for (int i = 0; i < ref_anchors.size(); i++) begin
      longint a;
      a = longint'(HOST_ANCHOR) + 16 * i;
      check(host_rx.exists(a) && host_rx[a] == {ref_anchors[i].val, 64'(ref_anchors[i].off)},
            "anchor record");
    end
    // error interrupt: with the DMA engine off the descriptor queue overflows
    check(!irq, "no interrupt during the run");
    mmr_write(8'h00, 64'h6);                       // DMA off, interrupt enabled
    for (int k = 0; k < 5; k++) begin
      check(!irq, "no interrupt before the overflow");
      mmr_write(8'h08, 64'(HOST_ANCHOR)); mmr_write(8'h10, 64'(ANCHOR_BASE));
      mmr_write(8'h18, {1'b1, 31'd0, 32'd64});
    end
    @(negedge clk);
    check(irq, "interrupt after descriptor queue overflow");
    if (irq) mcount[14]++;
    mmr_write(8'h00, 64'h106);                     // clear the overflow bit
    @(negedge clk);
    check(!irq, "interrupt cleared");
    if (!GO_EARLY && !ALG_AUTO)
      check(t_done - t_go <= longint'(NBYTES) + NBYTES / 16 + 200, "about one byte per clock");
    $display("bytes %0d anchors %0d (reference %0d), clocks from ALG_GO to last result %0d",
             NBYTES, n_anchor, ref_anchors.size(), t_done - t_go);
    for (int i = 0; i < NM; i++) begin
      $display("  %-40s %0d", mname[i], mcount[i]);
      if (REQUIRE_ALL && i != 15) check(mcount[i] > 0, "mechanism happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
