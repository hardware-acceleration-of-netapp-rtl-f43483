// alg_buffer_tb: drives an algorithm buffer the way the system does. A model
// requestor answers every need_data pulse, after a random delay, with four
// 16-byte bursts of a counting byte stream; the reader pulls bytes at random.
// Checks: bytes come out in the original order; the byte count is right; a
// request is raised exactly when held + 64 x waiting leaves 64 bytes free; at
// most four requests are outstanding; the buffer never overflows; and, with
// a continuous reader and a fast requestor, one byte leaves every clock.
module alg_buffer_tb;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0;
  logic [127:0] wr_data = '0;
  logic rd_en = 0;
  logic rd_valid, need_data;
  logic [7:0] rd_data;
  logic [8:0] count, waiting;
  alg_buffer dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  int reqs_q [$];        // delay countdown per outstanding request
  int beat_left = 0;
  int wr_byte = 0, rd_byte = 0;
  int mcount = 0, mwait = 0;
  int fast = 0, read_prob = 50;
  int max_wait = 0, reads_in_window = 0;

  always @(negedge clk) if (rst_n) begin
    // producer: one burst per clock while a due request is served
    wr_valid = 0;
    if (beat_left == 0 && reqs_q.size() > 0 && reqs_q[0] <= 0) begin
      void'(reqs_q.pop_front());
      beat_left = 4;
    end
    foreach (reqs_q[i]) reqs_q[i]--;
    if (beat_left > 0) begin
      wr_valid = 1;
      for (int b = 0; b < 16; b++) wr_data[8*b +: 8] = 8'(wr_byte + b);
      wr_byte += 16;
      beat_left--;
    end
    rd_en = rd_valid && ($urandom_range(0, 99) < read_prob);
  end

  always @(posedge clk) if (rst_n) begin
    // model of occupancy before this edge
    int free_after;
    check(32'(count) == mcount, "byte count");
    check(32'(waiting) == mwait, "waiting count");
    free_after = 256 - mcount - 64 * mwait;
    check(need_data == (free_after >= 64), "need_data rule");
    check(rd_valid == (mcount > 0), "rd_valid");
    if (rd_en) begin
      check(rd_data == 8'(rd_byte), "byte order");
      rd_byte++;
    end
    if (need_data) reqs_q.push_back(fast ? 0 : $urandom_range(0, 20));
    mcount += (wr_valid ? 16 : 0) - (rd_en ? 1 : 0);
    check(mcount <= 256, "no overflow");
    mwait += (need_data ? 1 : 0);
    if (wr_valid && (wr_byte % 64) == 0) mwait--;
    if (mwait > max_wait) max_wait = mwait;
    if (rd_en) reads_in_window++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3000) @(negedge clk);
    // throughput: continuous reader, immediate refills
    fast = 1; read_prob = 100;
    repeat (200) @(negedge clk);
    reads_in_window = 0;
    repeat (1000) @(negedge clk);
    check(reads_in_window >= 990, "one byte per clock sustained");
    check(max_wait == 4, "four requests outstanding reached");
    $display("bytes read %0d, max waiting %0d, last 1000 clocks %0d reads", rd_byte, max_wait, reads_in_window);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
