// alg_data_requestor: sends local-memory read requests that refill one
// algorithm buffer.
//
// Each need_data pulse from the buffer enqueues one 64-byte request (up to
// MAX_PENDING = 4). While requests are enqueued and the address counter says
// 64 bytes of host data are available, the requestor presents one read packet
// (address = next unread address, length 4 bursts, the buffer's special tag)
// to the memory arbiter and holds it until granted; only one request is
// offered at a time. Granting advances the address counter and dequeues.
// The queue depth, request size and address rule follow the description.
//
// Interface: req_valid/req_ready handshake, req is a mem_req_t. `blocked` is
// high while requests are enqueued but host data is not yet there (the
// requestor has caught up with the host).
module alg_data_requestor
  import anchor_pkg::*;
#(
  parameter logic [TAG_W-1:0] TAG         = ALG_TAG_BASE,
  parameter int unsigned      MAX_PENDING = 4,
  parameter int unsigned      REQ_BYTES   = anchor_pkg::REQ_SIZE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] base,
  input  logic              host_wr,
  input  logic              need_data,
  output logic              req_valid,
  output mem_req_t          req,
  input  logic              req_ready,
  output logic [$clog2(MAX_PENDING+1)-1:0] pending,
  output logic              blocked
);
  localparam int unsigned PW = $clog2(MAX_PENDING + 1);

  logic              fire, avail;
  logic [ADDR_W-1:0] rd_addr, fill_addr;

  alg_addr_counter #(.REQ_BYTES(REQ_BYTES)) u_addr (
    .clk, .rst_n, .load, .base, .host_wr,
    .advance(fire), .rd_addr, .fill_addr, .avail
  );

  assign req_valid = (pending != 0) && avail && !load;
  assign fire      = req_valid && req_ready;
  assign blocked   = (pending != 0) && !avail;

  always_comb begin
    req      = '0;
    req.wr   = 1'b0;
    req.tag  = TAG;
    req.len  = LEN_W'(REQ_BYTES / BEAT_BYTES);
    req.addr = rd_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else        pending <= pending + PW'(need_data) - PW'(fire);
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   need_data |-> (pending < PW'(MAX_PENDING) || fire));
  // a request, once offered, stays until it is granted
  assert property (@(posedge clk) disable iff (!rst_n)
                   (req_valid && !req_ready && !load) |=> req_valid);
endmodule
