// alg_data_requestor_tb: need_data pulses (at most four outstanding) and a
// random arbiter grant against a reference. Checks that a request is offered
// only when one is enqueued and host data is there, that it carries the next
// 64-byte address, length 4 and the buffer's tag, that it holds until granted,
// and that the requestor reports being blocked when it catches up with the
// host's writes.
module alg_data_requestor_tb;
  import anchor_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, host_wr = 0, need_data = 0, req_ready = 0;
  logic [31:0] base = 32'h400;
  logic req_valid, blocked;
  mem_req_t req;
  logic [2:0] pending;
  alg_data_requestor #(.TAG(8'hA1)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask
  longint rd = 0, fill = 0;
  int pend = 0, grants = 0, blocked_cycles = 0;
  bit was_waiting = 0;
  always @(posedge clk) if (rst_n) begin
    bit av;
    av = (fill - rd >= 64);
    check(32'(pending) == pend, "pending count");
    check(req_valid == (pend > 0 && av && !load), "request offered");
    check(blocked == (pend > 0 && !av), "blocked");
    if (req_valid) check(!req.wr && req.tag == 8'hA1 && req.len == 4 && req.addr == 32'(rd), "request packet");
    if (was_waiting) check(req_valid, "request held until granted");
    was_waiting = req_valid && !req_ready && !load;
    if (blocked) blocked_cycles++;
    if (load) begin rd = base; fill = base; end
    else begin
      if (req_valid && req_ready) begin rd += 64; grants++; end
      if (host_wr) fill += 16;
    end
    pend += (need_data ? 1 : 0) - ((req_valid && req_ready) ? 1 : 0);
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      need_data = (pend < 4) && ($urandom_range(0, 3) == 0);
      host_wr   = (i < 3000) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 1) == 0);
      req_ready = ($urandom_range(0, 2) != 0);
    end
    check(grants > 200 && blocked_cycles > 100, "grants and blocking exercised");
    $display("grants %0d blocked %0d", grants, blocked_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (9000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
