// alg_addr_counter_tb: random host bursts and request advances (only when
// allowed) against a reference of the read address, the fill address and the
// "64 bytes available" rule, including a reload to a new base.
module alg_addr_counter_tb;
  logic clk = 0, rst_n = 0, load = 0, host_wr = 0, advance = 0;
  logic [31:0] base = 0, rd_addr, fill_addr;
  logic avail;
  alg_addr_counter dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask
  longint r = 0, f = 0;
  int adv = 0;
  always @(posedge clk) if (rst_n) begin
    check(rd_addr == 32'(r) && fill_addr == 32'(f), "counters");
    check(avail == (f - r >= 64), "avail rule");
    if (load) begin r = base; f = base; end
    else begin
      if (advance) begin r += 64; adv++; end
      if (host_wr) f += 16;
    end
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      load    = (i == 2500);
      base    = 32'h0001_0000;
      host_wr = ($urandom_range(0, 4) == 0);
      advance = avail && ($urandom_range(0, 1) == 0);
    end
    check(adv > 100, "advances happened");
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
