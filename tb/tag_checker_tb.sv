// tag_checker_tb: a response stream mixing algorithm reads for both buffers,
// DMA reads and idle clocks. Checks that exactly the four data beats after an
// algorithm header reach the right buffer and nothing else does.
module tag_checker_tb;
  import anchor_pkg::*;
  logic clk = 0, rst_n = 0, rsp_valid = 0, rsp_sop = 0;
  logic [127:0] rsp_data = '0;
  logic [1:0] buf_wr;
  logic [127:0] buf_data;
  tag_checker dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask
  int exp_buf = -1;   // buffer the current data beat should reach, -1 none
  int fwd [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    if (exp_buf >= 0) check(buf_wr == 2'(1 << exp_buf) && buf_data == rsp_data, "forwarded beat");
    else              check(buf_wr == 2'b00, "not forwarded");
    if (buf_wr[0]) fwd[0]++;
    if (buf_wr[1]) fwd[1]++;
  end
  task automatic send(logic [7:0] tag, int beats);
    mem_hdr_t h;
    h = '0; h.tag = tag; h.len = 8'(beats); h.addr = $urandom;
    @(negedge clk); rsp_valid = 1; rsp_sop = 1; rsp_data = 128'(h); exp_buf = -1;
    for (int b = 0; b < beats; b++) begin
      @(negedge clk);
      rsp_sop = 0; rsp_data = {$urandom, $urandom, $urandom, $urandom};
      exp_buf = (tag == 8'hA0) ? 0 : (tag == 8'hA1) ? 1 : -1;
      rsp_valid = 1;
      if ($urandom_range(0, 3) == 0) begin   // a gap inside the packet
        rsp_valid = 0; exp_buf = -1; b--;
      end
    end
    @(negedge clk); rsp_valid = 0; exp_buf = -1;
  endtask
  int sent [2] = '{0, 0};
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom_range(0, 3);
      if (k == 0) begin send(8'hA0, 4); sent[0] += 4; end
      else if (k == 1) begin send(8'hA1, 4); sent[1] += 4; end
      else if (k == 2) send(8'h11, 4);
      else send(8'h02, 2);
    end
    repeat (3) @(negedge clk);
    check(fwd[0] == sent[0] && fwd[1] == sent[1], "beat totals");
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
