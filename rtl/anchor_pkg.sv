// anchor_pkg: types and constants shared by the anchor-detect accelerator.
//
// The accelerator finds "anchors" (landmark positions) in backup data with a
// rolling hash over a 4093-byte window. Window size, the three hash lane
// widths (64, 61, 59 bits), the 14 inspected hash bits, the 16-byte memory
// burst and the 64-byte (4-burst) algorithm read request follow the design
// description. The positions of the 14 mask bits, the table contents, the tag
// numbering and the packet field layout are this design's own choices: the
// original tables were randomly generated and hand-tuned and are not public,
// so here they are produced by a fixed 64-bit mixing function (splitmix64).
//
// Local-memory packets: a request (mem_req_t) carries a header and, for a
// write, one 16-byte data beat. A read returns a header beat (sop=1, fields in
// mem_hdr_t layout) followed by `len` 16-byte data beats.
package anchor_pkg;

  // ---- algorithm ----------------------------------------------------------
  localparam int unsigned WINDOW_LEN = 4093;  // bytes in the sliding window
  localparam int unsigned LANE_W0    = 64;    // widths of the three hash lanes
  localparam int unsigned LANE_W1    = 61;
  localparam int unsigned LANE_W2    = 59;
  // 14 inspected bits: 0,5,9,13,17,22,26,31,35,40,44,49,53,58 (all below 59,
  // so every lane contributes). An anchor is found when all of them are one.
  localparam logic [63:0] DEFAULT_MASK = 64'h0422_1108_8442_2221;

  // ---- memory system --------------------------------------------------------
  localparam int unsigned ADDR_W     = 32;    // local/host byte address width
  localparam int unsigned TAG_W      = 8;
  localparam int unsigned LEN_W      = 8;     // request length in 16-byte beats
  localparam int unsigned BEAT_BYTES = 16;    // one memory burst
  localparam int unsigned REQ_SIZE   = 64;    // one algorithm data request
  localparam int unsigned REQ_BURSTS = REQ_SIZE / BEAT_BYTES;

  // Tag ranges. DMA read (host to card) and DMA write (card to host) use
  // separate ranges; algorithm buffer reads and anchor writes use special tags.
  localparam logic [TAG_W-1:0] DMA_RD_TAG_BASE = 8'h00;
  localparam logic [TAG_W-1:0] DMA_WR_TAG_BASE = 8'h10;
  localparam logic [TAG_W-1:0] ALG_TAG_BASE    = 8'hA0;  // A0: buffer 1, A1: buffer 2
  localparam logic [TAG_W-1:0] ANCHOR_TAG      = 8'hAF;

  typedef struct packed {
    logic              wr;     // 1: write one beat, 0: read `len` beats
    logic [TAG_W-1:0]  tag;
    logic [LEN_W-1:0]  len;    // beats (reads); writes are always one beat
    logic [ADDR_W-1:0] addr;   // byte address, 16-byte aligned
    logic [127:0]      data;   // write data, byte i in bits 8i+7:8i
  } mem_req_t;

  // Header beat of a read response, 128 bits.
  typedef struct packed {
    logic [63:0]       rsvd_hi;
    logic [ADDR_W-1:0] addr;
    logic [15:0]       rsvd_lo;
    logic [LEN_W-1:0]  len;
    logic [TAG_W-1:0]  tag;
  } mem_hdr_t;

  // One DMA descriptor as written by the host.
  typedef struct packed {
    logic              to_host;     // 0: DMA read (host to card), 1: DMA write (card to host)
    logic [ADDR_W-1:0] host_addr;
    logic [ADDR_W-1:0] local_addr;
    logic [ADDR_W-1:0] len;         // bytes, multiple of 64
  } dma_desc_t;

  // Tag manager entry.
  typedef struct packed {
    logic [ADDR_W-1:0] host_addr;
    logic [ADDR_W-1:0] local_addr;
    logic [LEN_W-1:0]  len;
  } tag_entry_t;

  // ---- hash tables --------------------------------------------------------
  function automatic logic [63:0] mix64(input logic [63:0] x);
    logic [63:0] z;
    z = x + 64'h9E37_79B9_7F4A_7C15;
    z = (z ^ (z >> 30)) * 64'hBF58_476D_1CE4_E5B9;
    z = (z ^ (z >> 27)) * 64'h94D0_49BB_1331_11EB;
    return z ^ (z >> 31);
  endfunction

  function automatic logic [63:0] width_mask(input int unsigned w);
    return (w >= 64) ? '1 : ((64'd1 << w) - 64'd1);
  endfunction

  // Rotate the low w bits of x left by k.
  function automatic logic [63:0] rotl_w(input logic [63:0] x, input int unsigned k,
                                          input int unsigned w);
    logic [63:0] v;
    int unsigned r;
    v = x & width_mask(w);
    r = k % w;
    if (r == 0) return v;
    return ((v << r) | (v >> (w - r))) & width_mask(w);
  endfunction

  // Input table of lane `lane`: a fixed pseudo-random value per byte.
  function automatic logic [63:0] input_lut(input int unsigned lane, input logic [7:0] b,
                                             input int unsigned w);
    return mix64({24'h0A_4C_D0, 8'(lane), 24'h0, b}) & width_mask(w);
  endfunction

  // Exit table: the input value rotated by the window length, which is what
  // the entry of that byte has become after `window` rotations of the lane.
  function automatic logic [63:0] exit_lut(input int unsigned lane, input logic [7:0] b,
                                            input int unsigned w, input int unsigned window);
    return rotl_w(input_lut(lane, b, w), window, w);
  endfunction

endpackage
