// tb_ios_cache: self-checking testbench of one IOS cache level.
//
// A 1 KB, 4-way cache (4 sets) sits on the memory model. Directed cases cover
// miss and fill, the one-cycle hit latency, invalidation hit, invalidation of
// an in-flight miss (locked fake line, skipped copy, fill still passed up),
// invalidation of an absent line, round-robin replacement and the stall of a
// request to a line already in flight. A random phase then mixes loads and
// invalidations over a small address pool and checks that every response
// carries the right data, that every request is answered, that every
// invalidation is passed down in order, and that a line invalidated with no
// request since always misses.
module tb_ios_cache;
  import ios_pkg::*;
  import tb_ios_pkg::*;

  localparam int unsigned SIZE = 1024;
  localparam int unsigned WAYS = 4;
  localparam int unsigned SETS = SIZE / (LINE_BYTES * WAYS);
  localparam int unsigned LAT  = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic       req_valid, req_ready, resp_valid;
  line_addr_t req_addr, resp_addr;
  line_data_t resp_data;
  logic       inv_valid, inv_ready;
  line_addr_t inv_addr;
  logic       mreq_valid, mreq_ready, mresp_valid;
  line_addr_t mreq_addr, mresp_addr;
  line_data_t mresp_data;
  logic       invo_valid, invo_ready;
  line_addr_t invo_addr;
  cache_ev_t  ev;
  logic       hold;
  int         n_mem;

  ios_cache #(.SIZE_BYTES(SIZE), .WAYS(WAYS), .N_MSHR(2)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_addr_i(req_addr),
    .resp_valid_o(resp_valid), .resp_addr_o(resp_addr), .resp_data_o(resp_data),
    .inv_valid_i(inv_valid), .inv_ready_o(inv_ready), .inv_addr_i(inv_addr),
    .mreq_valid_o(mreq_valid), .mreq_ready_i(mreq_ready), .mreq_addr_o(mreq_addr),
    .mresp_valid_i(mresp_valid), .mresp_addr_i(mresp_addr), .mresp_data_i(mresp_data),
    .inv_valid_o(invo_valid), .inv_ready_i(invo_ready), .inv_addr_o(invo_addr),
    .ev_o(ev)
  );

  mem_model #(.LAT(LAT), .STALL_PCT(20)) u_mem (
    .clk_i(clk), .rst_ni(rst_n), .hold_i(hold),
    .req_valid_i(mreq_valid), .req_ready_o(mreq_ready), .req_addr_i(mreq_addr),
    .resp_valid_o(mresp_valid), .resp_addr_o(mresp_addr), .resp_data_o(mresp_data),
    .n_req_o(n_mem)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------ monitors
  int         n_resp = 0;
  int         resp_cnt [line_addr_t];
  line_addr_t inv_exp [$];
  int         n_inv_fwd = 0;
  int         n_hit = 0, n_miss = 0, n_stall = 0, n_inv_hit = 0, n_inv_lock = 0;
  int         n_inv_drop = 0, n_fill = 0, n_fill_skip = 0;
  bit         rand_ready = 1'b0;

  always @(negedge clk) if (rst_n) begin
    if (resp_valid) begin
      n_resp++;
      if (resp_cnt.exists(resp_addr)) resp_cnt[resp_addr]++;
      else resp_cnt[resp_addr] = 1;
      check(resp_data == line_pattern(resp_addr), $sformatf("response data of %h", resp_addr));
    end
    if (invo_valid && invo_ready) begin
      n_inv_fwd++;
      check(inv_exp.size() > 0 && inv_exp[0] == invo_addr,
            $sformatf("invalidation %h passed down out of order", invo_addr));
      if (inv_exp.size() > 0) void'(inv_exp.pop_front());
    end
    if (ev.hit) n_hit++;
    if (ev.miss) n_miss++;
    if (ev.mshr_stall) n_stall++;
    if (ev.inv_hit) n_inv_hit++;
    if (ev.inv_lock) n_inv_lock++;
    if (ev.inv_drop) n_inv_drop++;
    if (ev.fill) n_fill++;
    if (ev.fill_skip) n_fill_skip++;
  end

  always @(posedge clk) invo_ready <= rand_ready ? ($urandom_range(3) != 0) : 1'b1;

  // ------------------------------------------------------------ drivers
  // issue one load; returns whether it hit and checks the hit latency
  task automatic load(input line_addr_t a, output bit hit);
    @(posedge clk);
    req_valid <= 1'b1;
    req_addr  <= a;
    forever begin
      @(negedge clk);
      if (req_ready) break;
    end
    hit = ev.hit;
    @(posedge clk);
    req_valid <= 1'b0;
    if (hit) begin
      @(negedge clk);
      check(resp_valid && resp_addr == a, $sformatf("hit on %h answered one cycle later", a));
    end
  endtask

  // issue one invalidation; returns the event it caused here
  task automatic inval(input line_addr_t a, output cache_ev_t e);
    @(posedge clk);
    inv_valid <= 1'b1;
    inv_addr  <= a;
    forever begin
      @(negedge clk);
      if (inv_ready) break;
    end
    e = ev;
    inv_exp.push_back(a);
    @(posedge clk);
    inv_valid <= 1'b0;
  endtask

  task automatic wait_resp(input line_addr_t a, input int prev);
    int t = 0;
    while (resp_cnt[a] == prev && t < 200) begin
      @(negedge clk);
      t++;
    end
    check(resp_cnt[a] > prev, $sformatf("response for %h arrived", a));
  endtask

  function automatic line_addr_t mk(input int tag, input int set);
    return line_addr_t'(tag * SETS + set);
  endfunction

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ sequence
  initial begin
    bit         h;
    cache_ev_t  e;
    line_addr_t a, b, c;
    int         r0, m0;
    req_valid = 1'b0; req_addr = '0;
    inv_valid = 1'b0; inv_addr = '0;
    hold = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // miss, fill, then hit
    a = mk(3, 1);
    resp_cnt[a] = 0;
    load(a, h);
    check(!h, "first access misses");
    wait_resp(a, 0);
    load(a, h);
    check(h, "second access hits");

    // invalidation hit removes the line
    inval(a, e);
    check(e.inv_hit && !e.inv_lock, "invalidation of a present line hits");
    load(a, h);
    check(!h, "access after invalidation misses");
    wait_resp(a, resp_cnt[a]);

    // invalidation of a miss in flight: locked fake line, fill not copied
    b = mk(5, 2);
    resp_cnt[b] = 0;
    hold = 1'b1;
    m0 = n_fill_skip;
    load(b, h);
    check(!h, "transient load misses");
    repeat (3) @(posedge clk);
    inval(b, e);
    check(e.inv_lock && !e.inv_hit, "invalidation of an in-flight miss locks a fake line");
    @(negedge clk);
    check(dut.state_q[2][0] == LS_LOCKED, "fake line is locked in the set");
    // a second load to the same line waits for the fill
    @(posedge clk);
    req_valid <= 1'b1; req_addr <= b;
    @(negedge clk);
    check(!req_ready && ev.mshr_stall, "request to an in-flight line stalls");
    hold = 1'b0;
    forever begin
      @(negedge clk);
      if (req_ready) break;
    end
    h = ev.hit;
    @(posedge clk);
    req_valid <= 1'b0;
    check(resp_cnt[b] == 1, "fill passed up although it was not copied");
    check(n_fill_skip == m0 + 1, "fill meets the locked line and is skipped");
    check(dut.state_q[2][0] == LS_INVALID, "fake line released after the fill");
    check(!h, "skipped line is not in the cache");
    wait_resp(b, 1);
    load(b, h);
    check(h, "a later, non-transient load installs it");

    // invalidation of a line neither present nor in flight
    c = mk(9, 3);
    inval(c, e);
    check(e.inv_drop && !e.inv_hit && !e.inv_lock, "invalidation of an absent line does nothing");

    // round-robin replacement in set 0: five lines in four ways
    for (int t = 0; t < WAYS + 1; t++) begin
      resp_cnt[mk(20 + t, 0)] = 0;
      load(mk(20 + t, 0), h);
      check(!h, "fill of set 0 misses");
      wait_resp(mk(20 + t, 0), 0);
    end
    load(mk(20, 0), h);
    check(!h, "oldest line of a full set was replaced");
    wait_resp(mk(20, 0), 1);
    load(mk(20 + WAYS, 0), h);
    check(h, "newest line of the set is present");

    // random phase
    rand_ready = 1'b1;
    begin
      line_addr_t pool [16];
      bit         dirty_inv [line_addr_t];
      int         issued;
      repeat (3) @(posedge clk);
      issued = 0;
      r0     = n_resp;
      for (int i = 0; i < 16; i++) pool[i] = mk(40 + $urandom_range(7), $urandom_range(SETS - 1));
      for (int i = 0; i < 16; i++) dirty_inv[pool[i]] = 1'b0;
      repeat (600) begin
        a = pool[$urandom_range(15)];
        if ($urandom_range(2) == 0) begin
          inval(a, e);
          dirty_inv[a] = 1'b1;
        end else begin
          if (!resp_cnt.exists(a)) resp_cnt[a] = 0;
          load(a, h);
          issued++;
          if (dirty_inv[a]) check(!h, $sformatf("line %h invalidated since its last request misses", a));
          dirty_inv[a] = 1'b0;
        end
        repeat ($urandom_range(3)) @(posedge clk);
      end
      repeat (100) @(posedge clk);
      check(n_resp - r0 == issued, $sformatf("every random load answered (%0d of %0d)", n_resp - r0, issued));
    end
    repeat (20) @(posedge clk);
    check(inv_exp.size() == 0, "every invalidation passed down");

    $display("hits=%0d misses=%0d stalls=%0d inv_hit=%0d inv_lock=%0d inv_drop=%0d fill=%0d fill_skip=%0d fwd=%0d",
             n_hit, n_miss, n_stall, n_inv_hit, n_inv_lock, n_inv_drop, n_fill, n_fill_skip, n_inv_fwd);
    check(n_inv_hit > 1 && n_inv_lock > 1 && n_inv_drop > 1 && n_fill_skip > 1 && n_stall > 1,
          "random phase reached every mechanism");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
