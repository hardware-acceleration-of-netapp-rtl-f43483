// tx_format_tb: a response stream with DMA write reads and algorithm reads.
// A small table stands in for the tag manager. Checks that DMA data becomes
// host writes at the tag's host address plus 16 per beat with the last beat
// marked and the tag freed, and that algorithm data is discarded, never
// written to the host.
module tx_format_tb;
  import anchor_pkg::*;
  logic clk = 0, rst_n = 0, rsp_valid = 0, rsp_sop = 0;
  logic [127:0] rsp_data = '0;
  logic [7:0] lk_tag, free_tag;
  tag_entry_t lk_entry;
  logic hwr_valid, hwr_last, free, discard;
  logic [31:0] hwr_addr;
  logic [127:0] hwr_data;
  tx_format dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask
  logic [31:0] host_of [4];
  always_comb begin
    lk_entry = '0;
    if (lk_tag >= 8'h10 && lk_tag < 8'h14) lk_entry.host_addr = host_of[lk_tag - 8'h10];
  end
  typedef struct { bit to_host; bit last; logic [31:0] addr; logic [127:0] data; logic [7:0] tag; } exp_t;
  exp_t exp_now;
  bit   exp_any = 0;
  int writes = 0, drops = 0;
  always @(posedge clk) if (rst_n) begin
    if (exp_any && exp_now.to_host) begin
      check(hwr_valid && hwr_addr == exp_now.addr && hwr_data == exp_now.data, "host write");
      check(hwr_last == exp_now.last && free == exp_now.last, "last beat and free");
      if (exp_now.last) check(free_tag == exp_now.tag, "freed tag");
      check(!discard, "no discard on DMA data");
      writes++;
    end else if (exp_any) begin
      check(!hwr_valid && discard && !free, "algorithm data discarded");
      drops++;
    end else check(!hwr_valid && !discard && !free, "idle");
  end
  task automatic send(logic [7:0] tag);
    mem_hdr_t h;
    bit th;
    th = (tag >= 8'h10 && tag < 8'h14);
    h = '0; h.tag = tag; h.len = 8'd4; h.addr = $urandom;
    @(negedge clk); rsp_valid = 1; rsp_sop = 1; rsp_data = 128'(h); exp_any = 0;
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin rsp_valid = 0; exp_any = 0; @(negedge clk); end
      rsp_valid = 1; rsp_sop = 0; rsp_data = {$urandom, $urandom, $urandom, $urandom};
      exp_any = 1;
      exp_now = '{to_host: th, last: (b == 3), addr: th ? host_of[tag - 8'h10] + 32'(16 * b) : 0,
                  data: rsp_data, tag: tag};
    end
    @(negedge clk); rsp_valid = 0; exp_any = 0;
  endtask
  initial begin
    for (int i = 0; i < 4; i++) host_of[i] = 32'h1000_0000 + 32'(i * 32'h100);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(0, 1) == 0) send(8'h10 + 8'($urandom_range(0, 3)));
      else send(8'hA0 + 8'($urandom_range(0, 1)));
      if (i % 10 == 0) host_of[$urandom_range(0, 3)] = $urandom & 32'hFFFF_FFF0;
    end
    check(writes > 300 && drops > 300, "both kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
