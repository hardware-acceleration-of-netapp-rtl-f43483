// mem_arbiter_tb: five requesters that hold their request until granted, and
// a memory side that is randomly not ready. Checks one grant at most, only
// to a requester that asks and only when the memory is ready, the forwarded
// packet, round-robin order (the grant goes to the first asking requester
// after the last one granted), and that no requester waits more than five
// grants.
module mem_arbiter_tb;
  import anchor_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, out_ready = 0;
  logic [N-1:0] req_valid = '0, gnt;
  mem_req_t reqs [N];
  logic out_valid;
  mem_req_t out_req;
  mem_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask
  int last = N - 1;
  int waited [N] = '{0, 0, 0, 0, 0};
  int max_waited = 0, contended = 0;
  logic [N-1:0] taken = '0;   // granted at the last clock edge
  always @(posedge clk) if (rst_n) begin
    int exp;
    exp = -1;
    for (int k = 1; k <= N; k++) if (exp < 0 && req_valid[(last + k) % N]) exp = (last + k) % N;
    check(out_valid == (exp >= 0), "out_valid");
    if (exp >= 0) check(out_req == reqs[exp], "forwarded packet");
    check(gnt == ((exp >= 0 && out_ready) ? N'(1 << exp) : '0), "round-robin grant");
    if ($countones(req_valid) > 1) contended++;
    taken = gnt;
    if (out_ready && exp >= 0) begin
      last = exp;
      for (int i = 0; i < N; i++) if (req_valid[i] && i != exp) begin
        waited[i]++;
        if (waited[i] > max_waited) max_waited = waited[i];
      end
      waited[exp] = 0;
    end
  end
  initial begin
    for (int i = 0; i < N; i++) reqs[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (!req_valid[i] || taken[i]) begin
          req_valid[i] = ($urandom_range(0, 2) != 0);
          reqs[i] = '{wr: 1'($urandom), tag: 8'(i), len: 8'($urandom), addr: $urandom,
                      data: {$urandom, $urandom, $urandom, $urandom}};
        end
      end
      out_ready = ($urandom_range(0, 3) != 0);
    end
    check(max_waited <= N - 1 && contended > 1000, "fairness bound");
    $display("max grants waited %0d, contended clocks %0d", max_waited, contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (7000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
