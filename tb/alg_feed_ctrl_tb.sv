// alg_feed_ctrl_tb: random buffer-valid, go and stall patterns against a
// reference of the enable rules: buffer 1 alone for the first 4093 bytes,
// then both or neither, nothing while go is low or stall is high. Also checks
// the byte counter, the warm-up switch and the clear input.
module alg_feed_ctrl_tb;
  localparam int unsigned WINDOW = 4093;
  logic clk = 0, rst_n = 0, clear = 0, go = 0, stall = 0, b1_valid = 0, b2_valid = 0;
  logic b1_rd, b2_rd, warm, starved;
  logic [47:0] out_count;
  alg_feed_ctrl dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask
  longint n = 0;
  int both = 0, b2_blocked = 0;
  always @(posedge clk) if (rst_n) begin
    bit w, e1, e2;
    w  = (n >= WINDOW);
    e1 = go && !stall && b1_valid && (!w || b2_valid);
    e2 = go && !stall && w && b1_valid && b2_valid;
    check(out_count == 48'(n), "byte count");
    check(warm == w, "warm");
    check(b1_rd == e1 && b2_rd == e2, "enables");
    if (clear) n = 0;
    else if (e1) n++;
    if (e2) both++;
    if (w && go && !stall && b1_valid && !b2_valid) b2_blocked++;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      go       = ($urandom_range(0, 19) != 0);
      stall    = ($urandom_range(0, 9) == 0);
      b1_valid = ($urandom_range(0, 9) != 0);
      b2_valid = ($urandom_range(0, 9) != 0);
      clear    = (i == 20000);
    end
    check(both > 1000 && b2_blocked > 100, "both phases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
