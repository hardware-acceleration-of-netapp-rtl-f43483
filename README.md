# Anchor-detect accelerator

Deduplicating backup storage needs landmarks in the data: positions that
depend only on the bytes around them, so they stay put when data is
inserted or deleted elsewhere. This design finds such *anchors* in hardware.
It computes a rolling hash over a sliding window of 4093 bytes. When 14
chosen bits of the hash are all ones, the current position is an anchor.
On random data that happens about once every 16 kB (2^14 bytes).

The design is the card-side logic of a PCI-E accelerator card. The host
queues DMA descriptors in registers. The card copies the data into its own
local memory and streams it through the hash at one byte per clock. It
writes an (offset, hash value) record for every anchor back into local
memory, and the host can then fetch the records with another DMA
descriptor.

## The rolling hash

The hash has three lanes, 64, 61 and 59 bits wide. Each lane has:

- an *input* table: 256 entries, indexed by the byte that enters the window;
- an *exit* table: indexed by the byte that leaves the window, 4093 bytes
  earlier;
- a state register.

Every clock, each lane does:

    h <= rotl(h, 1) ^ IN[new_byte] ^ (warm ? EXIT[old_byte] : 0)

`rotl` rotates within the lane's width. The three lane states are
zero-extended to 64 bits and XORed together to give the hash. The position
is an anchor when `(hash & MASK) == MASK`.

Why the exit table cancels the leaving byte: a table value that entered
4093 clocks ago has since been rotated 4093 times. Define
`EXIT[b] = rotl(IN[b], 4093 mod width)`. XORing it in removes exactly that
contribution. The hash therefore depends only on the last 4093 bytes, so a
change in one byte shows in the hash for exactly 4093 results and then
disappears. `anchor_algorithm_tb` checks this directly.

The lane widths are all different. So 4093 mod width differs per lane (61,
6 and 22). That keeps the three lanes from cancelling one another.

Details:

- **Table contents.** The original values were random numbers adjusted by
  hand and are not available. Here they are computed at elaboration:
  `IN[lane][b] = splitmix64({24'h0A4CD0, lane, 24'h0, b})`, masked to the
  lane width (`anchor_pkg::input_lut`). The exit tables are derived from the
  input tables by the formula above. As a result, the anchors this design
  finds are not the same as those of the original software. The mechanism
  and the statistics are the same.
- **Default mask.** `64'h0422_1108_8442_2221` has 14 bits set: 0, 5, 9, 13,
  17, 22, 26, 31, 35, 40, 44, 49, 53 and 58. All are below 59, so every lane
  affects them. The mask is a register and the host can change it.
- **Results.** There is one result per byte, including the first 4092 bytes,
  before the window is full. The offset of a result is the 0-based position
  of the newest byte. Results appear two clocks after the byte, because the
  tables are synchronous ROMs.
- **Throughput.** The hash is a recurrence, so it is not pipelined beyond
  that. Throughput is one byte per clock: 125 MB/s at 125 MHz.

## Two buffers, one stream

The hash needs two bytes per clock: the byte entering the window and the
byte 4093 positions earlier. Storing a whole window on chip is avoided.
Instead, the same data is read from local memory **twice**, by two
independent paths:

- **Algorithm buffer 1** holds the bytes that enter the window.
- **Algorithm buffer 2** holds the same stream, to supply the bytes that
  leave it.

Each path has an *algorithm data requestor* with its own address counter.

The feed control (`alg_feed_ctrl`) works as follows:

- For the first 4093 bytes, only buffer 1 is read, and the hash runs "cold"
  (no exit term).
- After that, a byte is given only when **both** buffers have one. Both are
  then read together, and the exit term is on.
- Nothing is given while `ALG_GO` is low, or while the anchor record queue
  is nearly full.

Buffer 2 is simply 4093 bytes behind buffer 1 in the same stream. No FIFO of
window size is needed.

Each algorithm buffer (`alg_buffer`) is built like this:

- It has 16 byte-wide FIFOs of 16 entries, 256 bytes in all.
- It takes one 16-byte memory burst per clock, byte *i* into FIFO *i*.
- It gives one byte per clock from a rotating lane pointer, so bytes leave in
  their original order.
- It counts the 64-byte requests in flight. It raises `need_data` when
  `held + 64*waiting + 64 <= 256`, that is, when a further 64-byte request
  would still fit. Up to four requests can therefore be outstanding.

The data requestor (`alg_data_requestor`) works as follows:

- It enqueues up to four `need_data` pulses.
- It offers one 64-byte read to the memory arbiter at a time.
- It waits until the host-fill counter shows at least 64 bytes of host data
  beyond its read address (`alg_addr_counter`). So the algorithm can start
  before all data has arrived, and simply waits for it. The end-to-end test
  covers this case.

## Memory path and tags

All local memory traffic passes through one round-robin arbiter
(`mem_arbiter`) with five inputs:

| Port | Requester |
|---|---|
| 0 | DMA engine, local writes |
| 1 | DMA engine, local reads |
| 2 | requestor of buffer 1 |
| 3 | requestor of buffer 2 |
| 4 | anchor writer |

Requests are packets (`anchor_pkg::mem_req_t`) with these fields:

- a write flag;
- an 8-bit tag;
- a length in 16-byte beats;
- a byte address;
- one 16-byte data beat (writes only).

The memory controller interface (`mem_ctrl_if`) executes one packet at a
time. A read returns a header beat (`mem_hdr_t`: tag, length, address)
followed by the data beats, one per clock.

Read data is told apart only by its tag:

| Tag | Meaning | Destination |
|---|---|---|
| 0x00-0x03 | DMA read (host to card) | host completions |
| 0x10-0x13 | DMA write (card to host) | Tx format sends to host |
| 0xA0 | algorithm data, buffer 1 | tag checker to buffer 1 |
| 0xA1 | algorithm data, buffer 2 | tag checker to buffer 2 |
| 0xAF | anchor record write | (writes only) |

Both the tag checker (`tag_checker`) and the Tx format module (`tx_format`)
see every read response:

- The tag checker forwards the four beats after an 0xA0 or 0xA1 header to
  its buffer.
- The Tx format module turns DMA-write data into host writes and discards
  algorithm data.

The DMA engine (`dma_engine`), with its `tag_manager`, handles both
directions.

**Host to card (DMA read):**

- A descriptor is split into 64-byte host read requests.
- Each request gets a free read tag, and up to four can be outstanding.
- The tag manager holds each tag's local address.
- Completions arrive as four consecutive 16-byte beats for one tag. Each
  beat becomes a local write.

**Card to host (DMA write):**

- Each 64-byte chunk gets a write tag.
- A tagged local read is issued for the chunk.
- The Tx format module sends the data to the host address stored with the
  tag, then frees the tag.

**Anchor records** (`anchor_write_req`):

- A record is 16 bytes at `ANCHOR_BASE + 16*n`.
- Bytes 0-7 hold the offset. Bytes 8-15 hold the unmasked 64-bit hash.
- Records wait in an 8-entry queue. The queue stalls the feed when it has
  three or fewer free entries, enough for the results already in the hash
  pipeline.

## Registers

The registers are 64 bits wide, at byte offsets on the `mmr_*` port. Writes
take effect on the clock. Reads are combinational.

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | CTRL | rw | bit 0 DMA_EN, bit 1 ALG_GO, bit 2 IRQ_EN, bit 8 descriptor-queue overflow (sticky, write 1 to clear) |
| 0x08 | DESC_HOST | rw | host address of the next descriptor |
| 0x10 | DESC_LOCAL | rw | local address of the next descriptor |
| 0x18 | DESC_LEN | w | queues the descriptor; bits 31:0 length (multiple of 64), bit 63 direction (1 = card to host) |
| 0x20 | ALG_BASE | rw | local address of the data to scan; writing it restarts the address counters and the hash |
| 0x28 | ANCHOR_BASE | rw | where anchor records go; writing it restarts the record count |
| 0x30 | MASK | rw | anchor mask, resets to the 14-bit default |
| 0x38 | DESC_PTRS | ro | bits 31:0 head (descriptors taken), bits 63:32 tail (descriptors written) |
| 0x40 | RESULTS | ro | bytes processed |
| 0x48 | ANCHORS | ro | anchor records written |

A typical run:

1. Write ALG_BASE and ANCHOR_BASE.
2. Set DMA_EN.
3. Queue host-to-card descriptors that place the data at ALG_BASE onward.
4. Set ALG_GO. You can set it before or after the data arrives.
5. Wait until RESULTS equals the data length.
6. Read ANCHORS.
7. Queue one card-to-host descriptor for `16*ANCHORS` bytes (rounded up to
   64) from ANCHOR_BASE.

The descriptor queue is 4 deep. A descriptor written while it is full is
dropped and sets the overflow bit. While IRQ_EN is set, that error drives
`irq` until the host clears the bit.

If the card is built with `ALG_GO_RESET = 1`, ALG_GO is set from reset.
The algorithm then starts on the first bytes that arrive, without a register
write. In that case the host must not clear bit 1 when it writes CTRL.

## Top-level ports

`anchor_accel_top` has these parameters:

- `WINDOW` (4093);
- `LANES` (16);
- `DEPTH` (16);
- `MEM_AW` (24 word-address bits, that is 256 MB of local memory);
- `ALG_GO_RESET` (0).
The PCI-E core and the DDR2 controller are outside the design. Plain ports
stand in their place:

| Ports | Purpose |
|---|---|
| `mmr_wr`, `mmr_addr`, `mmr_wdata`, `mmr_rd_addr`, `mmr_rdata` | register access |
| `hrq_valid/ready`, `hrq_tag`, `hrq_addr`, `hrq_len` | read requests to host memory, 64 bytes each |
| `cpl_valid/ready`, `cpl_tag`, `cpl_data` | host completions: 4 consecutive 16-byte beats per tag |
| `hwr_valid`, `hwr_addr`, `hwr_data`, `hwr_last` | writes to host memory, 16 bytes per beat, assumed always accepted |
| `mem_en`, `mem_we`, `mem_addr`, `mem_wdata`, `mem_rdata` | synchronous 128-bit local memory; read data one clock after `mem_en` |
| `anchor_found` | pulses with every anchor |
| `irq` | interrupt request for the host: a descriptor overflow while IRQ_EN is set |

Everything runs on one clock, `clk`. Reset is `rst_n`: asynchronous and
active low.

## Files

- `rtl/anchor_pkg.sv`: constants, packet structs, and the table functions.
- `rtl/*.sv`: one module per block, as named above. `byte_fifo` is the
  small FIFO used inside `alg_buffer`.
- `tb/<module>_tb.sv`: a self-checking testbench for each block. Each one
  prints `TB_RESULT checks=N failures=M`.
- `tb/ddr_mem_model.sv`: a behavioural local memory used by the top-level
  tests.
- `tb/accel_env.sv`: a host model for the top. It issues descriptors, serves
  host reads with random latency and gaps, and records host writes. It also
  computes the expected anchors with its own rolling reference and checks
  every record, count and memory word.
- `tb/anchor_accel_top_tb.sv`: the end-to-end run on 8 kB of data. It uses a
  1-bit mask, so anchors are frequent and the record queue stalls. `ALG_GO`
  is set before the data arrives and host responses are slowed down, so the
  buffers starve. The test counts that each mechanism happened at least
  once:
  - buffers filled before `ALG_GO`;
  - buffer 1 running alone, then both buffers;
  - starvation, and the requestor catching up with the host data;
  - four requests outstanding;
  - arbiter contention;
  - routing to both buffers;
  - Tx-format discards;
  - anchors found;
  - anchor queue stalls;
  - all DMA read tags in use;
  - host writes;
  - the error interrupt being raised and cleared.
- `tb/anchor_accel_autostart_tb.sv`: the same end-to-end run with the card
  built with `ALG_GO_RESET = 1`. The host never writes ALG_GO.
- `tb/anchor_accel_full_tb.sv`: the top at its default parameters. It
  processes 64 kB of data with the default mask and checks the anchors and
  the rate: 65,536 bytes in 65,537 clocks once the data is in memory.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
      -Irtl -Itb --top-module anchor_accel_top_tb rtl/anchor_pkg.sv tb/anchor_accel_top_tb.sv
    ./obj_dir/Vanchor_accel_top_tb

To run any other testbench, replace the top module and the file name.
`anchor_accel_full_tb` takes a few seconds.

## Where the design departs from its description, and what it leaves open

- **Table values and mask bit positions** are this design's own; see above.
- **Exit table formula.** The original exit tables were produced by a
  program that "rotated, shifted and XORed" the input tables. Here the exit
  value is the input value rotated by the window length. This is the form
  that cancels exactly with a rotate-by-one state update.
- **Anchor compare.** The anchor test compares the masked hash with the mask
  itself, so all selected bits must be ones. A separate compare register
  could select zeros too.
- **Refill threshold.** The buffer asks for data while a further 64 bytes
  still fit (`<=`). A strict `<` would leave the buffer one request emptier.
  The `<=` rule allows the four outstanding requests a 256-byte buffer is
  meant to hold.
- **Buffer 2 start.** Buffer 2 starts after 4093 bytes have been given, so
  the first cancellation happens on the 4094th byte.
- **Anchor record destination.** Anchor records go to local memory, and the
  host fetches them with a DMA write. A variant that writes each anchor
  straight to host memory is possible but is not built.
- **Fixed widths and sizes:**
  - tag counts (4 read, 4 write);
  - descriptor queue depth (4);
  - anchor queue depth (8);
  - 48-bit result counter;
  - 32-bit addresses;
  - 64-byte host packets;
  - in-order completions per tag.
- **Not built:** the PCI-E core, the DDR2 controller with its error
  correction, the host driver, and the
  building of interrupt packets. The top's ports stand in for
  the first two.
- **Single-engine design.** The data is read from local memory twice. A
  parallel version with several hash engines on widely separated offsets
  is not built.
