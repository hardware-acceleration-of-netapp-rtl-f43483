// mem_ctrl_if_tb: random one-burst writes and 1..8-burst reads to a memory
// model. Checks each read response: a header one clock after acceptance with
// the request's tag, length and address, then exactly `len` data beats on the
// following clocks holding what was last written there, and req_ready low
// while a read is being issued.
module mem_ctrl_if_tb;
  import anchor_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0, req_valid = 0;
  mem_req_t req;
  logic req_ready, mem_en, mem_we, rsp_valid, rsp_sop;
  logic [AW-1:0] mem_addr;
  logic [127:0] mem_wdata, mem_rdata, rsp_data;
  mem_ctrl_if #(.MEM_AW(AW)) dut (.*);
  ddr_mem_model #(.AW(AW), .WORDS(1024)) u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
                                               .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask
  logic [127:0] shadow [1024];
  typedef struct packed { logic sop; logic [127:0] data; } beat_t;
  beat_t exp_q [$];
  int reads = 0, rsp_beats = 0;
  always @(posedge clk) if (rst_n) begin
    // header one clock after acceptance, data beats back to back after it
    if (exp_q.size() > 0) check(rsp_valid, "response timing");
    if (rsp_valid) begin
      check(exp_q.size() > 0, "response expected");
      if (exp_q.size() > 0) begin
        check(rsp_sop == exp_q[0].sop, "sop flag");
        check(rsp_data == exp_q[0].data, exp_q[0].sop ? "header" : "data beat");
        void'(exp_q.pop_front());
      end
      rsp_beats++;
    end
    if (req_valid && req_ready && !req.wr) check(exp_q.size() == 0, "read accepted only when idle");
    if (req_valid && req_ready) begin
      if (req.wr) shadow[req.addr[13:4]] = req.data;
      else begin
        mem_hdr_t h;
        h = '0; h.tag = req.tag; h.len = req.len; h.addr = req.addr;
        exp_q.push_back('{sop: 1'b1, data: 128'(h)});
        for (int b = 0; b < int'(req.len); b++) exp_q.push_back('{sop: 1'b0, data: shadow[10'(req.addr[13:4] + 10'(b))]});
        reads++;
      end
    end
  end
  initial begin
    for (int i = 0; i < 1024; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      if (!req_valid || req_ready) begin
        req_valid = ($urandom_range(0, 2) != 0);
        req.wr   = ($urandom_range(0, 1) == 0);
        req.tag  = 8'($urandom);
        req.len  = req.wr ? 8'd1 : 8'($urandom_range(1, 8));
        req.addr = {18'd0, 10'($urandom), 4'd0};
        req.data = {$urandom, $urandom, $urandom, $urandom};
      end
    end
    req_valid = 0;
    repeat (15) @(negedge clk);
    check(exp_q.size() == 0 && reads > 300, "all responses seen");
    $display("reads %0d beats %0d", reads, rsp_beats);
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
