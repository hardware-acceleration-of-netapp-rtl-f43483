// tag_manager_tb: random allocation and release in both tag ranges against a
// reference. Checks that the offered tag is the lowest free one of its range,
// that a full range is reported, that lookups return what was stored for a
// tag, and that the two ranges do not overlap.
module tag_manager_tb;
  import anchor_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rd_avail, wr_avail, rd_alloc = 0, wr_alloc = 0, rd_free = 0, wr_free = 0;
  logic [7:0] rd_tag, wr_tag, lk0_tag = 0, lk1_tag = 0, rd_free_tag = 0, wr_free_tag = 0;
  tag_entry_t rd_entry, wr_entry, lk0_entry, lk1_entry;
  logic [3:0] rd_busy, wr_busy;
  tag_manager dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask
  bit used [2][4];
  tag_entry_t tab [2][4];
  int full_seen = 0;
  function automatic int lowest(int r);
    for (int i = 0; i < 4; i++) if (!used[r][i]) return i;
    return -1;
  endfunction
  always @(posedge clk) if (rst_n) begin
    int l0, l1;
    l0 = lowest(0); l1 = lowest(1);
    check(rd_avail == (l0 >= 0) && wr_avail == (l1 >= 0), "avail");
    if (l0 >= 0) check(rd_tag == 8'(l0), "lowest read tag");
    if (l1 >= 0) check(wr_tag == 8'h10 + 8'(l1), "lowest write tag");
    if (l0 < 0 || l1 < 0) full_seen++;
    for (int i = 0; i < 4; i++) begin
      check(rd_busy[i] == used[0][i] && wr_busy[i] == used[1][i], "busy bits");
    end
    if (lk0_tag < 4 && used[0][lk0_tag]) check(lk0_entry == tab[0][lk0_tag], "lookup 0");
    if (lk1_tag >= 8'h10 && lk1_tag < 8'h14 && used[1][lk1_tag - 8'h10])
      check(lk1_entry == tab[1][lk1_tag - 8'h10], "lookup 1");
    if (rd_free) used[0][rd_free_tag] = 0;
    if (wr_free) used[1][wr_free_tag - 8'h10] = 0;
    if (rd_alloc && l0 >= 0) begin used[0][l0] = 1; tab[0][l0] = rd_entry; end
    if (wr_alloc && l1 >= 0) begin used[1][l1] = 1; tab[1][l1] = wr_entry; end
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      rd_alloc = ($urandom_range(0, 2) == 0);
      wr_alloc = ($urandom_range(0, 2) == 0);
      rd_entry = '{host_addr: $urandom, local_addr: $urandom, len: 8'($urandom)};
      wr_entry = '{host_addr: $urandom, local_addr: $urandom, len: 8'($urandom)};
      rd_free_tag = 8'($urandom_range(0, 3));
      wr_free_tag = 8'h10 + 8'($urandom_range(0, 3));
      rd_free = used[0][rd_free_tag] && ($urandom_range(0, 3) == 0);
      wr_free = used[1][wr_free_tag - 8'h10] && ($urandom_range(0, 3) == 0);
      lk0_tag = 8'($urandom_range(0, 3));
      lk1_tag = 8'h10 + 8'($urandom_range(0, 3));
    end
    check(full_seen > 100, "full range reached");
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
