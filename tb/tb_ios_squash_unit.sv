// tb_ios_squash_unit: self-checking testbench of the IOS squash unit.
//
// Random squash reports (mask, issued bits, fresh addresses) are offered
// while the L1 side accepts invalidations at random. A reference multiset of
// the addresses that must be invalidated (squashed AND issued) is kept by the
// testbench and every invalidation sent is removed from it; nothing may be
// sent twice or unasked, and all must drain. Also checked: a squash of only
// un-issued loads sends nothing, a conflicting squash is held back until the
// entry drains, the port holds an offer unchanged until taken, the drain rate
// is one invalidation per cycle when the L1 always accepts, and inv_count_o.
module tb_ios_squash_unit;
  import ios_pkg::*;

  localparam int unsigned N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         squash_valid, squash_ready;
  logic [N-1:0] squash_mask, lq_issued;
  line_addr_t   lq_addr [N];
  logic         inv_valid, inv_ready, busy;
  line_addr_t   inv_addr;
  logic [31:0]  inv_count;

  ios_squash_unit #(.LQ_ENTRIES(N)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .squash_valid_i(squash_valid), .squash_ready_o(squash_ready),
    .squash_mask_i(squash_mask), .lq_issued_i(lq_issued), .lq_addr_i(lq_addr),
    .inv_valid_o(inv_valid), .inv_ready_i(inv_ready), .inv_addr_o(inv_addr),
    .busy_o(busy), .inv_count_o(inv_count)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // expected invalidations: address -> how many still owed
  int         owed [line_addr_t];
  int         n_sent = 0, n_conflict = 0;
  int         ready_pct = 100;
  line_addr_t next_addr = 'h100;
  logic       last_offer_held = 1'b0;
  line_addr_t last_addr;

  always @(negedge clk) if (rst_n) begin
    if (last_offer_held) check(inv_valid && inv_addr == last_addr, "offer held until taken");
    if (inv_valid && inv_ready) begin
      n_sent++;
      check(owed.exists(inv_addr) && owed[inv_addr] > 0, $sformatf("invalidation %h was owed", inv_addr));
      if (owed.exists(inv_addr)) begin
        owed[inv_addr]--;
        if (owed[inv_addr] == 0) owed.delete(inv_addr);
      end
    end
    last_offer_held = inv_valid && !inv_ready;
    last_addr       = inv_addr;
    if (squash_valid && !squash_ready) n_conflict++;
  end

  always @(posedge clk) inv_ready <= ($urandom_range(99) < ready_pct);

  // offer one squash and hold it until accepted
  task automatic squash(input logic [N-1:0] m, input logic [N-1:0] iss);
    @(posedge clk);
    squash_valid <= 1'b1;
    squash_mask  <= m;
    lq_issued    <= iss;
    for (int i = 0; i < N; i++) begin
      lq_addr[i] <= next_addr;
      next_addr++;
    end
    forever begin
      @(negedge clk);
      if (squash_ready) break;
    end
    for (int i = 0; i < N; i++) begin
      if (m[i] && iss[i]) begin
        if (owed.exists(lq_addr[i])) owed[lq_addr[i]]++;
        else owed[lq_addr[i]] = 1;
      end
    end
    @(posedge clk);
    squash_valid <= 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, c0;
    squash_valid = 1'b0; squash_mask = '0; lq_issued = '0;
    for (int i = 0; i < N; i++) lq_addr[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);

    // squashed loads that never reached the cache send nothing
    squash(8'hF0, 8'h0F);
    repeat (5) @(posedge clk);
    check(n_sent == 0 && !busy, "un-issued squashed loads send nothing");

    // full squash drains at one invalidation per cycle
    c0 = int'(inv_count);
    squash(8'hFF, 8'hFF);
    t0 = int'($time / 10);
    @(negedge clk);
    while (busy) @(negedge clk);
    t1 = int'($time / 10);
    check(t1 - t0 <= N + 1, $sformatf("8 invalidations drained in %0d cycles", t1 - t0));
    check(int'(inv_count) - c0 == N, "inv_count counts the invalidations");
    check(owed.size() == 0, "all owed invalidations sent");

    // conflicting squash waits for the pending entry
    ready_pct = 0;
    repeat (2) @(posedge clk);
    squash(8'h01, 8'h01);
    fork
      squash(8'h03, 8'h03);
      begin
        repeat (6) @(posedge clk);
        ready_pct = 100;
      end
    join
    check(n_conflict > 3, "conflicting squash is held back");
    @(negedge clk);
    while (busy) @(negedge clk);
    check(owed.size() == 0, "conflicting squash sent after the drain");

    // random squashes with random acceptance
    ready_pct = 40;
    repeat (300) begin
      squash(N'($urandom), N'($urandom));
      repeat ($urandom_range(4)) @(posedge clk);
    end
    ready_pct = 100;
    repeat (3 * N) @(posedge clk);
    check(!busy && owed.size() == 0, "random squashes all drained");
    check(int'(inv_count) == n_sent, "inv_count matches invalidations seen");

    $display("sent=%0d conflict_cycles=%0d", n_sent, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
