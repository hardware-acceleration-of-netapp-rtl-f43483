// mem_arbiter: grants local-memory access among N requesters with equal
// priority (round robin).
//
// Each requester holds req_valid[i] with its packet reqs[i] until gnt[i]. A
// grant is given only when the memory controller interface is ready; the
// search for the next grant starts just after the last requester granted, so
// every waiting requester is served within N grants. Equal priority follows
// the description; round robin is this design's way of providing it.
// Combinational grant, no added latency.
module mem_arbiter
  import anchor_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req_valid,
  input  mem_req_t      reqs [N],
  output logic [N-1:0]  gnt,
  output logic          out_valid,
  output mem_req_t      out_req,
  input  logic          out_ready
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last, pick;
  logic          found;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (!found && req_valid[idx]) begin
        found = 1'b1;
        pick  = IW'(idx);
      end
    end
  end

  assign out_valid = found;
  assign out_req   = reqs[pick];

  always_comb begin
    gnt = '0;
    if (found && out_ready) gnt[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last <= IW'(N - 1);
    else if (found && out_ready)     last <= pick;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
