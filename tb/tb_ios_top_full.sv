// tb_ios_top_full: end-to-end test of the IOS cache subsystem with the top at
// its default sizes (32 KB 8-way L1 data cache, 2 MB 16-way L2, no LLC,
// 32-entry load queue): one Flush+Reload round with the secret already
// filled and one with it in flight, as described in ios_top_harness.
module tb_ios_top_full;
  ios_top_harness #(.FULL(1'b1)) h ();
endmodule
