// ios_top_harness: end-to-end test of the IOS cache subsystem, shared by
// tb_ios_top (small caches plus an LLC, so a run is short and every level
// sees evictions) and tb_ios_top_full (the top exactly at its defaults).
//
// The harness plays the core and the attacker of a Flush+Reload attack. A
// probe array of PROBE lines, STRIDE lines apart (256 lines 4 KB apart at
// full size, 16 adjacent lines in the small run), is never touched before an
// attack round. A
// transient load reads probe[secret] and is then squashed through the
// load-queue squash report. Afterwards the attacker reloads every probe line
// and counts which ones are answered without going to memory: with IOS none
// may be, at any level. A reference round first squashes the load without
// sending an invalidation, as a core without IOS would, and checks that the
// reload then finds exactly the secret line. Two kinds of IOS rounds follow:
//   * the secret line has arrived before the squash: every level must take
//     an invalidation hit;
//   * the secret line is still in flight at the squash (memory held back):
//     every level must lock a fake line and then skip copying the fill, and
//     the fill must still reach the core.
// A random phase follows (small configuration only): loads and squash
// reports over a shared address pool, with random memory back-pressure,
// checking every response's data and that every load is answered. Every
// mechanism (invalidation hit, fake locked line, skipped fill, invalidation
// reaching the bottom level, squash back-pressure, waiting miss) is counted
// and one that never happened is a failure.
module ios_top_harness
  import ios_pkg::*;
  import tb_ios_pkg::*;
#(
  parameter bit FULL = 1'b0
) ();

  localparam int unsigned LQ    = FULL ? 32 : 8;
  // probe array: PROBE lines, STRIDE lines apart (full size: 256 x 4 KB)
  localparam int unsigned PROBE  = FULL ? 256 : 16;
  localparam int unsigned STRIDE = FULL ? 64 : 1;
  localparam int unsigned LAT   = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          ld_valid, ld_ready, ld_resp_valid;
  line_addr_t    ld_addr, ld_resp_addr;
  line_data_t    ld_resp_data;
  logic          squash_valid, squash_ready;
  logic [LQ-1:0] squash_mask, lq_issued;
  line_addr_t    lq_addr [LQ];
  logic          mem_req_valid, mem_req_ready, mem_resp_valid;
  line_addr_t    mem_req_addr, mem_resp_addr;
  line_data_t    mem_resp_data;
  logic          busy;
  logic [31:0]   inv_count;
  cache_ev_t     ev1, ev2, ev3;
  logic          hold;
  int            n_mem;

  if (FULL) begin : g_full
    ios_top dut (
      .clk_i(clk), .rst_ni(rst_n),
      .ld_valid_i(ld_valid), .ld_ready_o(ld_ready), .ld_addr_i(ld_addr),
      .ld_resp_valid_o(ld_resp_valid), .ld_resp_addr_o(ld_resp_addr), .ld_resp_data_o(ld_resp_data),
      .squash_valid_i(squash_valid), .squash_ready_o(squash_ready),
      .squash_mask_i(squash_mask), .lq_issued_i(lq_issued), .lq_addr_i(lq_addr),
      .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready), .mem_req_addr_o(mem_req_addr),
      .mem_resp_valid_i(mem_resp_valid), .mem_resp_addr_i(mem_resp_addr), .mem_resp_data_i(mem_resp_data),
      .ios_busy_o(busy), .inv_count_o(inv_count),
      .ev_l1_o(ev1), .ev_l2_o(ev2), .ev_llc_o(ev3)
    );
  end else begin : g_small
    ios_top #(
      .LQ_ENTRIES(LQ),
      .L1_SIZE(1024), .L1_WAYS(4), .L1_MSHR(2),
      .L2_SIZE(4096), .L2_WAYS(4), .L2_MSHR(2),
      .LLC_EN(1'b1), .LLC_SIZE(8192), .LLC_WAYS(8), .LLC_MSHR(4)
    ) dut (
      .clk_i(clk), .rst_ni(rst_n),
      .ld_valid_i(ld_valid), .ld_ready_o(ld_ready), .ld_addr_i(ld_addr),
      .ld_resp_valid_o(ld_resp_valid), .ld_resp_addr_o(ld_resp_addr), .ld_resp_data_o(ld_resp_data),
      .squash_valid_i(squash_valid), .squash_ready_o(squash_ready),
      .squash_mask_i(squash_mask), .lq_issued_i(lq_issued), .lq_addr_i(lq_addr),
      .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready), .mem_req_addr_o(mem_req_addr),
      .mem_resp_valid_i(mem_resp_valid), .mem_resp_addr_i(mem_resp_addr), .mem_resp_data_i(mem_resp_data),
      .ios_busy_o(busy), .inv_count_o(inv_count),
      .ev_l1_o(ev1), .ev_l2_o(ev2), .ev_llc_o(ev3)
    );
  end

  mem_model #(.LAT(LAT), .STALL_PCT(0)) u_mem (
    .clk_i(clk), .rst_ni(rst_n), .hold_i(hold),
    .req_valid_i(mem_req_valid), .req_ready_o(mem_req_ready), .req_addr_i(mem_req_addr),
    .resp_valid_o(mem_resp_valid), .resp_addr_o(mem_resp_addr), .resp_data_o(mem_resp_data),
    .n_req_o(n_mem)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ monitors
  // event counters per level: 0 = L1, 1 = L2, 2 = LLC
  int n_inv_hit [3], n_inv_lock [3], n_fill_skip [3], n_inv_drop [3], n_stall [3];
  int n_sq_conflict = 0, n_resp = 0;
  int resp_cnt [line_addr_t];

  initial for (int l = 0; l < 3; l++) begin
    n_inv_hit[l] = 0; n_inv_lock[l] = 0; n_fill_skip[l] = 0; n_inv_drop[l] = 0; n_stall[l] = 0;
  end

  function automatic void count_ev(input int l, input cache_ev_t e);
    if (e.inv_hit)    n_inv_hit[l]++;
    if (e.inv_lock)   n_inv_lock[l]++;
    if (e.fill_skip)  n_fill_skip[l]++;
    if (e.inv_drop)   n_inv_drop[l]++;
    if (e.mshr_stall) n_stall[l]++;
  endfunction

  always @(negedge clk) if (rst_n) begin
    count_ev(0, ev1);
    count_ev(1, ev2);
    count_ev(2, ev3);
    if (squash_valid && !squash_ready) n_sq_conflict++;
    if (ld_resp_valid) begin
      n_resp++;
      if (resp_cnt.exists(ld_resp_addr)) resp_cnt[ld_resp_addr]++;
      else resp_cnt[ld_resp_addr] = 1;
      check(ld_resp_data == line_pattern(ld_resp_addr), $sformatf("load data of %h", ld_resp_addr));
    end
  end

  // ------------------------------------------------------------ core side
  task automatic load(input line_addr_t a, output bit hit);
    @(posedge clk);
    ld_valid <= 1'b1;
    ld_addr  <= a;
    forever begin
      @(negedge clk);
      if (ld_ready) break;
    end
    hit = ev1.hit;
    if (!resp_cnt.exists(a)) resp_cnt[a] = 0;
    @(posedge clk);
    ld_valid <= 1'b0;
  endtask

  task automatic wait_resp(input line_addr_t a, input int prev);
    int t = 0;
    while (resp_cnt[a] == prev && t < 2000) begin
      @(negedge clk);
      t++;
    end
    check(resp_cnt[a] > prev, $sformatf("load of %h answered", a));
  endtask

  // squash load-queue entries; the addresses go with them
  task automatic squash(input logic [LQ-1:0] m, input logic [LQ-1:0] iss,
                        input line_addr_t addrs [LQ]);
    @(posedge clk);
    squash_valid <= 1'b1;
    squash_mask  <= m;
    lq_issued    <= iss;
    for (int i = 0; i < LQ; i++) lq_addr[i] <= addrs[i];
    forever begin
      @(negedge clk);
      if (squash_ready) break;
    end
    @(posedge clk);
    squash_valid <= 1'b0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
    repeat (10) @(posedge clk);
  endtask

  function automatic line_addr_t probe(input line_addr_t base, input int k);
    return base + line_addr_t'(k * STRIDE);
  endfunction

  // reload every probe line; returns how many came from some cache level
  // and the index of the last such line
  task automatic reload(input line_addr_t base, output int cached, output int found);
    bit h;
    int m0;
    cached = 0;
    found  = -1;
    for (int k = 0; k < PROBE; k++) begin
      m0 = n_mem;
      load(probe(base, k), h);
      wait_resp(probe(base, k), 0);
      if (n_mem == m0) begin
        cached++;
        found = k;
      end
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ sequence
  initial begin
    bit         h;
    int         cached, secret, rounds, found;
    line_addr_t base, sec;
    line_addr_t addrs [LQ];
    int         h0 [3], l0 [3], s0 [3];
    int         m0;
    bit         sq_active;
    ld_valid = 1'b0; ld_addr = '0;
    squash_valid = 1'b0; squash_mask = '0; lq_issued = '0;
    for (int i = 0; i < LQ; i++) begin
      lq_addr[i] = '0;
      addrs[i]   = '0;
    end
    hold      = 1'b0;
    sq_active = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);

    rounds = FULL ? 1 : 3;
    for (int r = 0; r < rounds; r++) begin
      // ---- reference round: the squash report says the load never reached
      // the cache, so no invalidation is sent, as in a core without IOS;
      // the reload must then reveal the secret
      base   = line_addr_t'('h100000 + r * 'h10000);
      secret = $urandom_range(PROBE - 1);
      sec    = probe(base, secret);
      load(sec, h);
      wait_resp(sec, 0);
      addrs[0] = sec;
      squash(LQ'(1), LQ'(0), addrs);
      wait_idle();
      resp_cnt.delete();
      reload(base, cached, found);
      check(cached == 1 && found == secret,
            $sformatf("without invalidation the reload reveals the secret (%0d cached, found %0d, secret %0d)",
                      cached, found, secret));

      // ---- round with the secret line already filled
      base   = line_addr_t'('h200000 + r * 'h10000);
      secret = $urandom_range(PROBE - 1);
      sec    = probe(base, secret);
      for (int l = 0; l < 3; l++) h0[l] = n_inv_hit[l];
      load(sec, h);                       // transient load, entry 0
      wait_resp(sec, 0);
      addrs[0] = sec;
      squash(LQ'(1), LQ'(1), addrs);
      wait_idle();
      check(n_inv_hit[0] == h0[0] + 1 && n_inv_hit[1] == h0[1] + 1,
            "filled secret: L1 and L2 invalidation hit");
      if (!FULL) check(n_inv_hit[2] == h0[2] + 1, "filled secret: LLC invalidation hit");
      resp_cnt.delete();
      reload(base, cached, found);
      check(cached == 0, $sformatf("filled secret: %0d probe lines found cached", cached));

      // ---- round with the secret line still in flight
      base   = line_addr_t'('h300000 + r * 'h10000);
      secret = $urandom_range(PROBE - 1);
      sec    = probe(base, secret);
      for (int l = 0; l < 3; l++) begin
        l0[l] = n_inv_lock[l];
        s0[l] = n_fill_skip[l];
      end
      hold = 1'b1;
      m0   = n_mem;
      load(sec, h);
      while (n_mem == m0) @(negedge clk);
      // other loads of the same squash that never reached the cache
      addrs[0] = sec;
      addrs[1] = sec + 1;
      squash(LQ'(3), LQ'(1), addrs);
      wait_idle();
      check(n_inv_lock[0] == l0[0] + 1 && n_inv_lock[1] == l0[1] + 1,
            "in-flight secret: L1 and L2 lock a fake line");
      if (!FULL) check(n_inv_lock[2] == l0[2] + 1, "in-flight secret: LLC locks a fake line");
      hold = 1'b0;
      wait_resp(sec, 0);
      repeat (5) @(posedge clk);
      check(n_fill_skip[0] == s0[0] + 1 && n_fill_skip[1] == s0[1] + 1,
            "in-flight secret: L1 and L2 skip the fill");
      if (!FULL) check(n_fill_skip[2] == s0[2] + 1, "in-flight secret: LLC skips the fill");
      resp_cnt.delete();
      reload(base, cached, found);
      check(cached == 0, $sformatf("in-flight secret: %0d probe lines found cached", cached));

      // ---- without a squash the line stays: the reload does see it
      base = line_addr_t'('h400000 + r * 'h10000);
      load(base, h);
      wait_resp(base, 0);
      load(base, h);
      check(h, "a load that is not squashed leaves its line in the L1");
    end

    // ---- two squashes back to back naming the same entries: the second
    // waits until the first one's invalidations have drained
    for (int i = 0; i < LQ; i++) addrs[i] = line_addr_t'('h500000 + i);
    squash('1, '1, addrs);
    squash('1, '1, addrs);
    wait_idle();
    check(n_sq_conflict > 0, "squash back-pressure happened");

    // ---- random phase: loads and squashes over a shared pool
    if (!FULL) begin
      line_addr_t pool [32];
      int         issued, r0;
      logic [LQ-1:0] m, iss;
      resp_cnt.delete();
      repeat (5) @(posedge clk);
      issued = 0;
      r0     = n_resp;
      for (int i = 0; i < 32; i++) pool[i] = line_addr_t'('h20000 + $urandom_range(255));
      for (int it = 0; it < 1500; it++) begin
        if ($urandom_range(3) == 0) begin
          for (int i = 0; i < LQ; i++) addrs[i] = pool[$urandom_range(31)];
          m   = LQ'($urandom);
          iss = LQ'($urandom);
          if (!sq_active) begin
            sq_active = 1'b1;
            fork
              begin
                squash(m, iss, addrs);
                sq_active = 1'b0;
              end
            join_none
          end
          @(posedge clk);
        end else begin
          load(pool[$urandom_range(31)], h);
          issued++;
        end
        if (it == 500) begin
          fork
            begin
              hold = 1'b1;
              repeat (60) @(posedge clk);
              hold = 1'b0;
            end
          join_none
        end
      end
      wait fork;
      wait_idle();
      repeat (300) @(posedge clk);
      check(n_resp - r0 == issued, $sformatf("random phase: %0d of %0d loads answered", n_resp - r0, issued));
    end

    $display("inv_hit  L1=%0d L2=%0d LLC=%0d", n_inv_hit[0], n_inv_hit[1], n_inv_hit[2]);
    $display("inv_lock L1=%0d L2=%0d LLC=%0d", n_inv_lock[0], n_inv_lock[1], n_inv_lock[2]);
    $display("skip     L1=%0d L2=%0d LLC=%0d", n_fill_skip[0], n_fill_skip[1], n_fill_skip[2]);
    $display("inv_drop L1=%0d L2=%0d LLC=%0d", n_inv_drop[0], n_inv_drop[1], n_inv_drop[2]);
    $display("stall    L1=%0d L2=%0d LLC=%0d squash_backpressure=%0d invalidations=%0d",
             n_stall[0], n_stall[1], n_stall[2], n_sq_conflict, inv_count);
    for (int l = 0; l < (FULL ? 2 : 3); l++) begin
      check(n_inv_hit[l] > 0, $sformatf("level %0d: invalidation hit happened", l + 1));
      check(n_inv_lock[l] > 0, $sformatf("level %0d: fake locked line happened", l + 1));
      check(n_fill_skip[l] > 0, $sformatf("level %0d: skipped fill happened", l + 1));
    end
    if (!FULL) begin
      check(n_inv_drop[0] + n_inv_drop[1] + n_inv_drop[2] > 0, "invalidation with nothing to remove happened");
      check(n_stall[0] > 0, "load waiting for an in-flight line happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
