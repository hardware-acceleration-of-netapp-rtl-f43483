// anchor_algorithm_tb: self-checking test of the anchor-detect rolling hash.
//
// Feeds random bytes (with random idle clocks) through the algorithm with the
// full 4093-byte window and checks, for every byte:
//  * the result appears exactly two clocks after the byte, numbered in order;
//  * the hash equals a reference rolled independently in the testbench, and,
//    at sampled positions, the hash recomputed from scratch as the XOR of
//    every window byte's table value rotated by its age (no rolling at all);
//  * the anchor flag equals (hash & mask) == mask, with a 4-bit mask so that
//    anchors are frequent.
// A second run repeats the data with only the first byte changed: the hashes
// must differ for the first 4093 results and agree from then on, which shows
// that a byte's effect is cancelled exactly when it leaves the window.
module anchor_algorithm_tb;
  import anchor_pkg::*;

  localparam int unsigned W     = WINDOW_LEN;
  localparam int unsigned N     = 6000;
  localparam int unsigned CNT_W = 48;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [63:0] mask;
  logic in_valid = 0, exit_valid = 0;
  logic [7:0] in_byte = 0, exit_byte = 0;
  logic res_valid, anchor_valid;
  logic [CNT_W-1:0] res_offset, anchor_offset, result_count;
  logic [63:0] res_hash, anchor_value;

  anchor_algorithm #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0]  data [N];
  logic [63:0] hash_run1 [N];
  int run = 0;
  int anchors_seen = 0;
  longint cyc = 0;
  longint sent_cyc [N];

  // independent reference: rolling per lane
  logic [63:0] rl [3];
  int unsigned lw [3] = '{LANE_W0, LANE_W1, LANE_W2};

  function automatic logic [63:0] direct_hash(int unsigned t);
    logic [63:0] h;
    h = '0;
    for (int l = 0; l < 3; l++) begin
      logic [63:0] acc;
      acc = '0;
      for (int j = 0; j < W && j <= int'(t); j++)
        acc ^= rotl_w(input_lut(l, data[t - j], lw[l]), j, lw[l]);
      h ^= acc;
    end
    return h;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  int exp_idx = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !clear && res_valid) begin
      logic [63:0] ref_h;
      int t;
      t = exp_idx;
      for (int l = 0; l < 3; l++) begin
        rl[l] = rotl_w(rl[l], 1, lw[l]) ^ input_lut(l, data[t], lw[l]);
        if (t >= int'(W)) rl[l] ^= rotl_w(input_lut(l, data[t - W], lw[l]), W, lw[l]);
      end
      ref_h = rl[0] ^ rl[1] ^ rl[2];
      check(res_offset == CNT_W'(t), "result offset");
      check(cyc == sent_cyc[t] + 2, "two-clock latency");
      check(res_hash == ref_h, "hash vs rolling reference");
      if (t % 50 == 7 || t == int'(W) - 1 || t == int'(W) || t == N - 1)
        check(res_hash == direct_hash(t), "hash vs direct window sum");
      check(anchor_valid == ((ref_h & mask) == mask), "anchor flag");
      if (anchor_valid) begin
        anchors_seen++;
        check(anchor_offset == CNT_W'(t) && anchor_value == ref_h, "anchor record");
      end
      if (run == 0) hash_run1[t] = res_hash;
      else if (t < int'(W)) check(res_hash != hash_run1[t], "differs inside first window");
      else                  check(res_hash == hash_run1[t], "equal after window");
      exp_idx++;
    end
  end

  task automatic feed_all();
    int t;
    t = 0;
    while (t < N) begin
      @(negedge clk);
      if ($urandom_range(0, 3) != 0) begin
        in_valid   = 1;
        in_byte    = data[t];
        exit_valid = (t >= int'(W));
        exit_byte  = (t >= int'(W)) ? data[t - W] : 8'h00;
        sent_cyc[t] = cyc;
        t++;
      end else begin
        in_valid = 0; exit_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0; exit_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    mask = 64'h0000_0000_0002_1004;   // 3 bits: about one anchor per 8 bytes
    for (int i = 0; i < N; i++) data[i] = 8'($urandom);
    for (int l = 0; l < 3; l++) rl[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    feed_all();
    check(exp_idx == N && result_count == CNT_W'(N), "result count run 1");
    // run 2: same data, first byte changed
    clear = 1; @(negedge clk); clear = 0;
    run = 1; exp_idx = 0;
    for (int l = 0; l < 3; l++) rl[l] = '0;
    data[0] = data[0] ^ 8'h5A;
    feed_all();
    check(exp_idx == N && result_count == CNT_W'(N), "result count run 2");
    check(anchors_seen > 100, "anchors occurred");
    $display("anchors seen: %0d", anchors_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
