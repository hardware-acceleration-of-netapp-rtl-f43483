// anchor_lut_tb: checks an input table and the matching exit table of the
// 61-bit hash lane. Every exit entry must equal the input entry rotated left
// 4093 times (done here one bit at a time), data must appear one clock after
// the address, and the output must hold while `en` is low.
module anchor_lut_tb;
  import anchor_pkg::*;
  localparam int unsigned WD = 61;
  logic clk = 0;
  logic en = 0;
  logic [7:0] addr = 0;
  logic [WD-1:0] din, dex;
  anchor_lut #(.WIDTH(WD), .LANE(1), .EXIT(1'b0)) u_in (.clk, .en, .addr, .data(din));
  anchor_lut #(.WIDTH(WD), .LANE(1), .EXIT(1'b1)) u_ex (.clk, .en, .addr, .data(dex));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s addr %0d", what, addr); end
  endtask
  function automatic logic [WD-1:0] rot_n(logic [WD-1:0] v, int n);
    for (int i = 0; i < n; i++) v = {v[WD-2:0], v[WD-1]};
    return v;
  endfunction
  logic [WD-1:0] held;
  logic [WD-1:0] seen [256];
  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); en = 1; addr = 8'(a);
      @(negedge clk); en = 0;
      check(din == WD'(input_lut(1, 8'(a), WD)), "input entry");
      check(dex == rot_n(din, WINDOW_LEN), "exit entry = input rotated by window");
      seen[a] = din;
      held = din; addr = 8'(a + 1);
      @(negedge clk);
      check(din == held, "output holds while en low");
    end
    // the table is not degenerate
    begin
      int same = 0;
      for (int a = 1; a < 256; a++) if (seen[a] == seen[a-1]) same++;
      check(same == 0, "distinct neighbouring entries");
    end
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
