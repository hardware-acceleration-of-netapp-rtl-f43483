// anchor_write_req_tb: bursts of anchors against a slow, random grant.
// Checks every write request (address base + 16 n, offset and value in the
// record, write of one burst with the anchor tag), that records leave in
// order, that stall rises before the queue can overflow (the test honours it
// with a two-clock delay like the algorithm pipeline), and the written count.
module anchor_write_req_tb;
  import anchor_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, anchor_valid = 0, req_ready = 0;
  logic [31:0] base = 32'h0008_0000;
  logic [47:0] anchor_offset = 0;
  logic [63:0] anchor_value = 0;
  logic req_valid, stall;
  mem_req_t req;
  logic [31:0] anchors_written;
  anchor_write_req dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask
  logic [127:0] q [$];
  int n = 0, stalls = 0, produced = 0;
  logic stall_d1 = 0, stall_d2 = 0;
  always @(posedge clk) if (rst_n) begin
    if (req_valid) begin
      check(q.size() > 0, "request only when queued");
      if (q.size() > 0)
        check(req.wr && req.len == 1 && req.tag == ANCHOR_TAG &&
              req.addr == base + 32'(16 * n) && req.data == q[0], "write request");
    end else check(q.size() == 0, "queued record offered");
    check(anchors_written == 32'(n), "written count");
    if (req_valid && req_ready) begin void'(q.pop_front()); n++; end
    if (anchor_valid) q.push_back({anchor_value, 16'h0, anchor_offset});
    check(q.size() <= 8, "queue bound");
    if (stall) stalls++;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      stall_d2 = stall_d1; stall_d1 = stall;
      // like the algorithm: bytes stop when stall is seen, results still in flight
      anchor_valid = !(stall_d1 && stall_d2) && ($urandom_range(0, 2) == 0);
      if (anchor_valid) begin
        anchor_offset = 48'(produced * 37);
        anchor_value  = {$urandom, $urandom};
        produced++;
      end
      req_ready = ($urandom_range(0, 3) == 0);
    end
    anchor_valid = 0; req_ready = 1;
    repeat (20) @(negedge clk);
    check(n == produced && stalls > 50, "all written, stall exercised");
    $display("anchors %0d stall clocks %0d", n, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
