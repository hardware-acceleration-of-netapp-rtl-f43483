// anchor_accel_top_tb: end-to-end run of the whole card design at its default
// parameters on 8 kB of random data, with a 1-bit anchor mask so that about
// every second byte is an anchor and the anchor queue fills, and ALG_GO set
// while data is still arriving from a host that delivers 128 bytes every
// ~170 clocks, so that the algorithm catches up with the host and starves.
// Every mechanism counted by accel_env must happen.
module anchor_accel_top_tb;
  accel_env #(.NBYTES(8192), .MASK(64'h0000_0000_0000_0100), .GO_EARLY(1'b1),
              .HOST_GAP(160), .REQUIRE_ALL(1'b1), .WATCHDOG(400_000)) env ();
endmodule
