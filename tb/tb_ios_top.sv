// tb_ios_top: end-to-end test of the IOS cache subsystem at small sizes
// (1 KB L1, 4 KB L2, 8 KB LLC, 8-entry load queue) so that every level sees
// evictions, fake locked lines and skipped fills within a short run. The
// scenario itself is in ios_top_harness.
module tb_ios_top;
  ios_top_harness #(.FULL(1'b0)) h ();
endmodule
