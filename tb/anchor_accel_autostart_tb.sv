// anchor_accel_autostart_tb: end-to-end run of the card built with the
// algorithm enabled from reset (ALG_GO_RESET=1). The host never writes
// ALG_GO: it turns the DMA engine on and streams 8 kB of random data as
// 128-byte descriptors with gaps, and the algorithm starts on the first bytes
// that reach its buffer. Anchors (1-bit mask, frequent), the result count,
// the records copied back to the host and the error interrupt are checked
// as in anchor_accel_top_tb.
module anchor_accel_autostart_tb;
  accel_env #(.NBYTES(8192), .MASK(64'h0000_0000_0000_0100), .ALG_AUTO(1'b1),
              .HOST_GAP(40), .REQUIRE_ALL(1'b0), .WATCHDOG(400_000)) env ();
  // outer watchdog, later than the environment's own
  initial begin
    repeat (500_000) @(posedge env.clk);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
