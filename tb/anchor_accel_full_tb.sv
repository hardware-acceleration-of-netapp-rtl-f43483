// anchor_accel_full_tb: one complete operation of the card design at its
// default parameters and default 14-bit mask: 64 kB of random data is copied
// from the host into local memory, the algorithm runs over all of it, and the
// anchor records are copied back to the host and compared with a reference.
// The algorithm is started after the data is loaded, and must then process
// about one byte per clock.
module anchor_accel_full_tb;
  accel_env #(.NBYTES(65536), .REQUIRE_ALL(1'b0), .WATCHDOG(2_000_000)) env ();
endmodule
