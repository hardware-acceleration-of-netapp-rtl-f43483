// mmr_regs_tb: register writes and read-back, control bits, load pulses,
// descriptor queueing with a consumer that is randomly not ready (descriptor
// fields, order, head/tail pointers), queue overflow, the error interrupt and
// its clearing, the status inputs, and a second instance built with ALG_GO
// set from reset.
module mmr_regs_tb;
  import anchor_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [7:0] addr = 0, rd_addr = 0;
  logic [63:0] wdata = 0, rdata, mask;
  logic dma_en, alg_go, alg_load, anchor_load, desc_valid, desc_ready = 0;
  logic [31:0] alg_base, anchor_base, anchors = 32'd17;
  dma_desc_t desc;
  logic [63:0] results = 64'd12345;
  logic irq, alg_go2;
  logic [63:0] rdata2;
  mmr_regs dut (.*);
  mmr_regs #(.ALG_GO_RESET(1'b1)) dut2 (
    .clk, .rst_n, .wr(1'b0), .addr(8'h00), .wdata(64'h0), .rd_addr(8'h00), .rdata(rdata2),
    .dma_en(), .alg_go(alg_go2), .mask(), .alg_load(), .alg_base(), .anchor_load(),
    .anchor_base(), .desc_valid(), .desc(), .desc_ready(1'b0), .results(64'h0),
    .anchors(32'h0), .irq());
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask
  task automatic w(logic [7:0] a, logic [63:0] d);
    @(negedge clk); wr = 1; addr = a; wdata = d;
    @(negedge clk); wr = 0;
  endtask
  // rdata is combinational in rd_addr
  task automatic rd(input logic [7:0] a, output logic [63:0] d);
    rd_addr = a; #1; d = rdata;
  endtask
  logic [63:0] v, v2;
  bit hold = 1;
  dma_desc_t exp_q [$];
  int taken = 0, loads = 0, aloads = 0;
  bit full, prev_alg = 0, prev_anc = 0;
  logic [31:0] last_host, last_local;
  always @(posedge clk) if (rst_n) begin
    check(alg_load == prev_alg && anchor_load == prev_anc, "load pulses");
    prev_alg = wr && addr == 8'h20; prev_anc = wr && addr == 8'h28;
    if (alg_load) loads++;
    if (anchor_load) aloads++;
    check(desc_valid == (exp_q.size() > 0), "descriptor valid");
    full = (exp_q.size() == 4);
    if (desc_valid && desc_ready) begin
      check(desc == exp_q[0], "descriptor fields and order");
      void'(exp_q.pop_front());
      taken++;
    end
    if (wr && addr == 8'h08) last_host = wdata[31:0];
    if (wr && addr == 8'h10) last_local = wdata[31:0];
    if (wr && addr == 8'h18 && !full)
      exp_q.push_back('{to_host: wdata[63], host_addr: last_host, local_addr: last_local, len: wdata[31:0]});
  end
  always @(negedge clk) desc_ready = !hold && ($urandom_range(0, 2) == 0);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    rd(8'h30, v); check(v == DEFAULT_MASK && mask == DEFAULT_MASK, "mask reset value");
    rd(8'h00, v); check(v == 0 && !dma_en && !alg_go && !irq, "control reset");
    check(alg_go2 && rdata2 == 64'h2, "ALG_GO set from reset when built so");
    w(8'h00, 64'h3);
    rd(8'h00, v); check(dma_en && alg_go && v == 64'h3, "control bits");
    w(8'h30, 64'h0000_00F0_0000_000F);
    rd(8'h30, v); check(mask == 64'h0000_00F0_0000_000F && v == mask, "mask write");
    w(8'h20, 64'h1000); w(8'h28, 64'h8_0000);
    @(negedge clk);  // the load pulses are registered one clock after the write
    rd(8'h20, v); rd(8'h28, v2);
    check(alg_base == 32'h1000 && anchor_base == 32'h8_0000 && v == 64'h1000 && v2 == 64'h8_0000, "bases");
    check(loads == 1 && aloads == 1, "one load pulse each");
    rd(8'h40, v); rd(8'h48, v2); check(v == 64'd12345 && v2 == 64'd17, "status registers");
    for (int i = 0; i < 40; i++) begin
      dma_desc_t d;
      d = '{to_host: 1'($urandom), host_addr: $urandom, local_addr: $urandom,
            len: 32'(64 * $urandom_range(1, 8))};
      w(8'h08, 64'(d.host_addr));
      w(8'h10, 64'(d.local_addr));
      @(negedge clk); wr = 1; addr = 8'h18; wdata = {d.to_host, 31'd0, d.len};
      if (i == 20) hold = 0;
      @(negedge clk); wr = 0;
    end
    repeat (60) @(negedge clk);
    check(exp_q.size() == 0, "queue drained");
    rd(8'h38, v); check(v == {32'(taken), 32'(taken)}, "head and tail pointers");
    rd(8'h00, v); check(v[8] == 1'b1, "overflow flagged");
    check(!irq, "no interrupt while IRQ_EN is clear");
    w(8'h00, 64'h7);
    rd(8'h00, v); check(irq && v == 64'h107, "interrupt on overflow");
    w(8'h00, 64'h107);
    rd(8'h00, v); check(!irq && v == 64'h7, "overflow cleared, interrupt dropped");
    $display("descriptors taken %0d", taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
