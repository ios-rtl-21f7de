// ios_cache: one level of a read-only, set-associative, non-blocking cache
// with Invalidation on Squash (IOS). The same module serves as the L1 data
// cache, the L2 cache and the last-level cache.
//
// What IOS adds to a plain cache:
//   * An invalidation port from the level above (from the squash unit for the
//     L1). An invalidation carries only a line address and gets no reply.
//   * Invalidation hit: the valid line holding that address is invalidated.
//   * Invalidation miss while a miss to the same line is still in flight: a
//     fake line with the line's tag and state LOCKED is written into the set.
//     When the fill arrives it finds the locked line, the data is not copied
//     into the cache and the fake line is released (set INVALID). The fill is
//     still passed up, because the level above is waiting for it.
//   * Invalidation miss with no miss in flight: nothing to remove here.
//   * Every invalidation, whatever it found, is passed on to the level below,
//     so it reaches the bottom of the hierarchy.
//
// Organisation (this design's choices where the method leaves them open):
// line-sized transfers, no stores (the cache only serves loads, so no line is
// ever dirty), N_MSHR miss entries, a request to a line that is already in
// flight waits until the fill, victim = first invalid way, else a per-set
// round-robin way, never a locked way. N_MSHR must stay below WAYS so that a
// set always keeps an unlocked way for a fill.
//
// One operation per cycle, chosen in this order: fill from below (always
// accepted, no ready), invalidation from above, request from above. Tag and
// data arrays are read combinationally; a hit is answered one cycle after the
// request is accepted (resp_valid_o), a fill is passed up one cycle after it
// arrives. An invalidation is accepted only while no miss request waits for
// the level below, so a level below always sees a miss request before an
// invalidation that was accepted after it. Valid/ready handshakes: valid and
// address stay stable until ready. resp_* and mresp_* have no ready.
// Linter note: rst_ni is used asynchronously by the flops and synchronously
// by the handshake assertions (disable iff); this is intended.
module ios_cache
  import ios_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 32768,  // L1 data cache: 32 KB
  parameter int unsigned WAYS       = 8,      // L1 data cache: 8-way
  parameter int unsigned N_MSHR     = 4       // outstanding misses
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  // requests from the level above
  input  logic       req_valid_i,
  output logic       req_ready_o,
  input  line_addr_t req_addr_i,
  output logic       resp_valid_o,
  output line_addr_t resp_addr_o,
  output line_data_t resp_data_o,
  // invalidations from the level above
  input  logic       inv_valid_i,
  output logic       inv_ready_o,
  input  line_addr_t inv_addr_i,
  // misses to the level below and their fills
  output logic       mreq_valid_o,
  input  logic       mreq_ready_i,
  output line_addr_t mreq_addr_o,
  input  logic       mresp_valid_i,
  input  line_addr_t mresp_addr_i,
  input  line_data_t mresp_data_i,
  // invalidations to the level below
  output logic       inv_valid_o,
  input  logic       inv_ready_i,
  output line_addr_t inv_addr_o,
  // event strobes
  output cache_ev_t  ev_o
);

  localparam int unsigned SETS   = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned IDX_W  = $clog2(SETS);
  localparam int unsigned TAG_W  = LA_W - IDX_W;
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned MSHR_W = (N_MSHR > 1) ? $clog2(N_MSHR) : 1;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [WAY_W-1:0] way_t;

  // ---------------------------------------------------------------- storage
  line_state_e state_q [SETS][WAYS];
  tag_t        tag_q   [SETS][WAYS];
  line_data_t  data_q  [SETS][WAYS];
  way_t        rr_q    [SETS];

  logic [N_MSHR-1:0] mshr_vld_q;
  line_addr_t        mshr_addr_q [N_MSHR];

  logic       mreq_vld_q;
  line_addr_t mreq_addr_q;
  logic       invo_vld_q;
  line_addr_t invo_addr_q;
  logic       resp_vld_q;
  line_addr_t resp_addr_q;
  line_data_t resp_data_q;

  // ---------------------------------------------------------------- select
  logic       op_fill, op_inv, op_req, inv_slot_free;
  line_addr_t look_addr;
  idx_t       idx;
  tag_t       tag;

  always_comb begin
    op_fill       = mresp_valid_i;
    inv_slot_free = !invo_vld_q || inv_ready_i;
    op_inv        = !op_fill && inv_valid_i && inv_slot_free && !mreq_vld_q;
    if (op_fill)     look_addr = mresp_addr_i;
    else if (op_inv) look_addr = inv_addr_i;
    else             look_addr = req_addr_i;
    idx = look_addr[IDX_W-1:0];
    tag = look_addr[LA_W-1:IDX_W];
  end

  // ---------------------------------------------------------------- lookup
  logic [WAYS-1:0]   hit_vec, lock_vec, inval_vec;
  logic [N_MSHR-1:0] mshr_match;
  logic              hit, locked, mshr_hit, mshr_free, victim_ok;
  way_t              hit_way, lock_way, victim_way;
  logic [MSHR_W-1:0] free_slot;

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      inval_vec[w] = (state_q[idx][w] == LS_INVALID);
      hit_vec[w]   = (state_q[idx][w] == LS_VALID)  && (tag_q[idx][w] == tag);
      lock_vec[w]  = (state_q[idx][w] == LS_LOCKED) && (tag_q[idx][w] == tag);
    end
    hit    = |hit_vec;
    locked = |lock_vec;

    hit_way  = '0;
    lock_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (hit_vec[w])  hit_way  = way_t'(w);
      if (lock_vec[w]) lock_way = way_t'(w);
    end

    // victim: first invalid way, else the round-robin way unless it is
    // locked, else the first way that is not locked
    victim_ok  = 1'b0;
    victim_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (state_q[idx][w] != LS_LOCKED) begin
        victim_ok  = 1'b1;
        victim_way = way_t'(w);
      end
    end
    if (!(|inval_vec) && state_q[idx][rr_q[idx]] != LS_LOCKED) begin
      victim_way = rr_q[idx];
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (inval_vec[w]) victim_way = way_t'(w);
    end

    for (int m = 0; m < N_MSHR; m++) begin
      mshr_match[m] = mshr_vld_q[m] && (mshr_addr_q[m] == look_addr);
    end
    mshr_hit  = |mshr_match;
    mshr_free = !(&mshr_vld_q);
    free_slot = '0;
    for (int m = N_MSHR - 1; m >= 0; m--) begin
      if (!mshr_vld_q[m]) free_slot = MSHR_W'(m);
    end
  end

  logic req_can;
  always_comb begin
    req_can = hit || (!mshr_hit && mshr_free && !mreq_vld_q);
    op_req  = !op_fill && !op_inv && req_valid_i && req_can;
  end

  assign req_ready_o  = op_req;
  assign inv_ready_o  = op_inv;
  assign resp_valid_o = resp_vld_q;
  assign resp_addr_o  = resp_addr_q;
  assign resp_data_o  = resp_data_q;
  assign mreq_valid_o = mreq_vld_q;
  assign mreq_addr_o  = mreq_addr_q;
  assign inv_valid_o  = invo_vld_q;
  assign inv_addr_o   = invo_addr_q;

  // ---------------------------------------------------------------- events
  always_comb begin
    ev_o            = '0;
    ev_o.hit        = op_req && hit;
    ev_o.miss       = op_req && !hit;
    ev_o.mshr_stall = !op_fill && !op_inv && req_valid_i && !req_can;
    ev_o.inv_hit    = op_inv && hit;
    ev_o.inv_lock   = op_inv && !hit && mshr_hit && !locked;
    ev_o.inv_drop   = op_inv && !hit && !(mshr_hit && !locked);
    ev_o.fill       = op_fill && !locked;
    ev_o.fill_skip  = op_fill && locked;
  end

  // ---------------------------------------------------------------- update
  // line state, round-robin pointers, miss entries and output registers
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int s = 0; s < SETS; s++) begin
        for (int w = 0; w < WAYS; w++) state_q[s][w] <= LS_INVALID;
        rr_q[s] <= '0;
      end
      mshr_vld_q <= '0;
      mreq_vld_q <= 1'b0;
      invo_vld_q <= 1'b0;
      resp_vld_q <= 1'b0;
    end else begin
      resp_vld_q <= 1'b0;
      if (mreq_vld_q && mreq_ready_i) mreq_vld_q <= 1'b0;
      if (invo_vld_q && inv_ready_i)  invo_vld_q <= 1'b0;

      if (op_fill) begin
        mshr_vld_q <= mshr_vld_q & ~mshr_match;
        if (locked) begin
          state_q[idx][lock_way] <= LS_INVALID;   // skip copying, release
        end else begin
          state_q[idx][victim_way] <= LS_VALID;
          rr_q[idx] <= (victim_way == way_t'(WAYS - 1)) ? '0 : victim_way + 1'b1;
        end
        resp_vld_q <= 1'b1;                        // pass the fill up
      end else if (op_inv) begin
        invo_vld_q <= 1'b1;                        // pass the invalidation down
        if (hit) begin
          state_q[idx][hit_way] <= LS_INVALID;
        end else if (mshr_hit && !locked) begin
          state_q[idx][victim_way] <= LS_LOCKED;   // fake locked line
        end
      end else if (op_req) begin
        if (hit) begin
          resp_vld_q <= 1'b1;
        end else begin
          mshr_vld_q[free_slot] <= 1'b1;
          mreq_vld_q            <= 1'b1;
        end
      end
    end
  end

  // tags, data and address registers (no reset needed: guarded by the
  // state and valid bits above)
  always_ff @(posedge clk_i) begin
    if (op_fill) begin
      if (!locked) begin
        tag_q[idx][victim_way]  <= tag;
        data_q[idx][victim_way] <= mresp_data_i;
      end
      resp_addr_q <= mresp_addr_i;
      resp_data_q <= mresp_data_i;
    end else if (op_inv) begin
      invo_addr_q <= inv_addr_i;
      if (!hit && mshr_hit && !locked) tag_q[idx][victim_way] <= tag;
    end else if (op_req) begin
      if (hit) begin
        resp_addr_q <= req_addr_i;
        resp_data_q <= data_q[idx][hit_way];
      end else begin
        mshr_addr_q[free_slot] <= req_addr_i;
        mreq_addr_q            <= req_addr_i;
      end
    end
  end

  // ---------------------------------------------------------------- checks
  initial begin
    assert (SETS >= 2 && (SETS & (SETS - 1)) == 0)
      else $error("ios_cache: number of sets must be a power of two >= 2");
    assert (N_MSHR < WAYS)
      else $error("ios_cache: N_MSHR must be below WAYS");
  end

  // a fill answers a miss this level sent, and always finds a way
  a_fill_known: assert property (@(posedge clk_i) disable iff (!rst_ni)
    mresp_valid_i |-> mshr_hit && (locked || victim_ok));
  // requests and invalidations from above hold until accepted
  a_req_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
    req_valid_i && !req_ready_o |=> req_valid_i && $stable(req_addr_i));
  a_inv_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
    inv_valid_i && !inv_ready_o |=> inv_valid_i && $stable(inv_addr_i));

endmodule
