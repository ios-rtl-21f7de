// ios_squash_unit: the Invalidation-on-Squash (IOS) signal source next to the
// core's retirement/squash logic.
//
// When the core squashes instructions it reports, for one cycle or until
// squash_ready_o, which load-queue entries are being squashed
// (squash_mask_i), which entries had already sent their access to the L1 data
// cache (lq_issued_i) and the line address of every entry (lq_addr_i). Only
// squashed loads that reached the cache can have pulled a line in, so only
// those are invalidated; stores and other instructions are not tracked here.
// The unit copies the selected addresses into its own pending list, so the
// load queue may reuse the entries at once, and sends one invalidation per
// cycle to the L1 (inv_valid_o/inv_ready_i/inv_addr_o), lowest entry first;
// an offer not yet taken stays on the port unchanged.
// An invalidation carries no data and gets no reply.
//
// A new squash is accepted in the cycle it arrives unless one of its entries
// is still pending from an earlier squash; then squash_ready_o is low and the
// core holds the squash. busy_o is high while invalidations are pending and
// inv_count_o counts the invalidations sent. The pending list, the conflict
// rule and the lowest-first order are this design's choices.
// Linter note: rst_ni is used asynchronously by the flops and synchronously
// by the handshake assertions (disable iff); this is intended.
module ios_squash_unit
  import ios_pkg::*;
#(
  parameter int unsigned LQ_ENTRIES = 32   // load/store queue entries
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  // from the core
  input  logic                  squash_valid_i,
  output logic                  squash_ready_o,
  input  logic [LQ_ENTRIES-1:0] squash_mask_i,
  input  logic [LQ_ENTRIES-1:0] lq_issued_i,
  input  line_addr_t            lq_addr_i [LQ_ENTRIES],
  // to the L1 data cache
  output logic                  inv_valid_o,
  input  logic                  inv_ready_i,
  output line_addr_t            inv_addr_o,
  // status
  output logic                  busy_o,
  output logic [31:0]           inv_count_o
);

  localparam int unsigned SEL_W = (LQ_ENTRIES > 1) ? $clog2(LQ_ENTRIES) : 1;

  logic [LQ_ENTRIES-1:0] pend_q;
  line_addr_t            addr_q [LQ_ENTRIES];
  logic [31:0]           count_q;

  logic [LQ_ENTRIES-1:0] new_mask, clr_mask;
  logic [SEL_W-1:0]      sel;
  logic                  accept;
  logic                  hold_q;       // last offer was not taken: keep it
  logic [SEL_W-1:0]      hold_sel_q;

  always_comb begin
    new_mask       = squash_mask_i & lq_issued_i;
    squash_ready_o = !(|(pend_q & new_mask));
    accept         = squash_valid_i && squash_ready_o;

    sel = '0;
    for (int i = LQ_ENTRIES - 1; i >= 0; i--) begin
      if (pend_q[i]) sel = SEL_W'(i);
    end
    if (hold_q) sel = hold_sel_q;
    inv_valid_o = |pend_q;
    inv_addr_o  = addr_q[sel];
  end

  always_comb begin
    clr_mask = '0;
    if (inv_valid_o && inv_ready_i) clr_mask[sel] = 1'b1;
  end

  assign busy_o      = |pend_q;
  assign inv_count_o = count_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pend_q     <= '0;
      count_q    <= '0;
      hold_q     <= 1'b0;
      hold_sel_q <= '0;
    end else begin
      hold_q     <= inv_valid_o && !inv_ready_i;
      hold_sel_q <= sel;
      pend_q <= (pend_q & ~clr_mask) | (accept ? new_mask : '0);
      if (inv_valid_o && inv_ready_i) count_q <= count_q + 1;
    end
  end

  always_ff @(posedge clk_i) begin
    for (int i = 0; i < LQ_ENTRIES; i++) begin
      if (accept && new_mask[i]) addr_q[i] <= lq_addr_i[i];
    end
  end

  // an invalidation offered to the L1 holds until accepted
  a_inv_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
    inv_valid_o && !inv_ready_i |=> inv_valid_o && $stable(inv_addr_o));

endmodule
