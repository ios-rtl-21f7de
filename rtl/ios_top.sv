// ios_top: cache subsystem of one out-of-order core protected by
// Invalidation on Squash (IOS).
//
// The core side has two ports: load requests to the L1 data cache (one line
// address, answered on ld_resp_* by a hit or by the fill of a miss) and the
// squash report of the load queue, which goes to the squash unit. The squash
// unit sends one invalidation per squashed load that reached the L1; the L1
// acts on it and passes it to the L2, the L2 to the LLC when one is present.
// Each level removes a valid line on an invalidation hit, or inserts a locked
// fake line when the squashed load's miss is still in flight, so the late
// fill is not copied in. Memory sits below the last level on mem_*; it gets
// misses and returns fills, and receives no invalidations.
//
// Sizes follow the evaluated machine: L1 data cache 32 KB 8-way, L2 2 MB
// 16-way, 64-byte lines, 32 load/store queue entries. That machine has no
// LLC, so LLC_EN is 0 by default; with LLC_EN = 1 a third level is inserted
// between the L2 and memory (its size is this design's choice). The miss
// entries per level and the 32-bit address are also this design's choices.
// Linter notes: rst_ni is used asynchronously by the flops and synchronously
// by the handshake assertions, and without an LLC the L2's outgoing
// invalidation is unused; both are intended.
// ev_l1_o, ev_l2_o and ev_llc_o are one-cycle event strobes of each level
// (ev_llc_o is zero without an LLC); inv_count_o counts invalidations sent.
module ios_top
  import ios_pkg::*;
#(
  parameter int unsigned LQ_ENTRIES = 32,
  parameter int unsigned L1_SIZE    = 32 * 1024,
  parameter int unsigned L1_WAYS    = 8,
  parameter int unsigned L1_MSHR    = 4,
  parameter int unsigned L2_SIZE    = 2 * 1024 * 1024,
  parameter int unsigned L2_WAYS    = 16,
  parameter int unsigned L2_MSHR    = 8,
  parameter bit          LLC_EN     = 1'b0,
  parameter int unsigned LLC_SIZE   = 8 * 1024 * 1024,
  parameter int unsigned LLC_WAYS   = 16,
  parameter int unsigned LLC_MSHR   = 8
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  // core: loads
  input  logic                  ld_valid_i,
  output logic                  ld_ready_o,
  input  line_addr_t            ld_addr_i,
  output logic                  ld_resp_valid_o,
  output line_addr_t            ld_resp_addr_o,
  output line_data_t            ld_resp_data_o,
  // core: squash report of the load queue
  input  logic                  squash_valid_i,
  output logic                  squash_ready_o,
  input  logic [LQ_ENTRIES-1:0] squash_mask_i,
  input  logic [LQ_ENTRIES-1:0] lq_issued_i,
  input  line_addr_t            lq_addr_i [LQ_ENTRIES],
  // memory below the last cache level
  output logic                  mem_req_valid_o,
  input  logic                  mem_req_ready_i,
  output line_addr_t            mem_req_addr_o,
  input  logic                  mem_resp_valid_i,
  input  line_addr_t            mem_resp_addr_i,
  input  line_data_t            mem_resp_data_i,
  // status
  output logic                  ios_busy_o,
  output logic [31:0]           inv_count_o,
  output cache_ev_t             ev_l1_o,
  output cache_ev_t             ev_l2_o,
  output cache_ev_t             ev_llc_o
);

  // squash unit -> L1
  logic       s_inv_valid, s_inv_ready;
  line_addr_t s_inv_addr;

  ios_squash_unit #(.LQ_ENTRIES(LQ_ENTRIES)) u_squash (
    .clk_i, .rst_ni,
    .squash_valid_i, .squash_ready_o, .squash_mask_i, .lq_issued_i, .lq_addr_i,
    .inv_valid_o (s_inv_valid),
    .inv_ready_i (s_inv_ready),
    .inv_addr_o  (s_inv_addr),
    .busy_o      (ios_busy_o),
    .inv_count_o
  );

  // L1 <-> L2
  logic       l1_mreq_valid, l1_mreq_ready;
  line_addr_t l1_mreq_addr;
  logic       l1_mresp_valid;
  line_addr_t l1_mresp_addr;
  line_data_t l1_mresp_data;
  logic       l1_inv_valid, l1_inv_ready;
  line_addr_t l1_inv_addr;

  ios_cache #(.SIZE_BYTES(L1_SIZE), .WAYS(L1_WAYS), .N_MSHR(L1_MSHR)) u_l1d (
    .clk_i, .rst_ni,
    .req_valid_i   (ld_valid_i),
    .req_ready_o   (ld_ready_o),
    .req_addr_i    (ld_addr_i),
    .resp_valid_o  (ld_resp_valid_o),
    .resp_addr_o   (ld_resp_addr_o),
    .resp_data_o   (ld_resp_data_o),
    .inv_valid_i   (s_inv_valid),
    .inv_ready_o   (s_inv_ready),
    .inv_addr_i    (s_inv_addr),
    .mreq_valid_o  (l1_mreq_valid),
    .mreq_ready_i  (l1_mreq_ready),
    .mreq_addr_o   (l1_mreq_addr),
    .mresp_valid_i (l1_mresp_valid),
    .mresp_addr_i  (l1_mresp_addr),
    .mresp_data_i  (l1_mresp_data),
    .inv_valid_o   (l1_inv_valid),
    .inv_ready_i   (l1_inv_ready),
    .inv_addr_o    (l1_inv_addr),
    .ev_o          (ev_l1_o)
  );

  // L2 <-> level below (LLC or memory)
  logic       l2_mreq_valid, l2_mreq_ready;
  line_addr_t l2_mreq_addr;
  logic       l2_mresp_valid;
  line_addr_t l2_mresp_addr;
  line_data_t l2_mresp_data;
  logic       l2_inv_valid, l2_inv_ready;
  line_addr_t l2_inv_addr;

  ios_cache #(.SIZE_BYTES(L2_SIZE), .WAYS(L2_WAYS), .N_MSHR(L2_MSHR)) u_l2 (
    .clk_i, .rst_ni,
    .req_valid_i   (l1_mreq_valid),
    .req_ready_o   (l1_mreq_ready),
    .req_addr_i    (l1_mreq_addr),
    .resp_valid_o  (l1_mresp_valid),
    .resp_addr_o   (l1_mresp_addr),
    .resp_data_o   (l1_mresp_data),
    .inv_valid_i   (l1_inv_valid),
    .inv_ready_o   (l1_inv_ready),
    .inv_addr_i    (l1_inv_addr),
    .mreq_valid_o  (l2_mreq_valid),
    .mreq_ready_i  (l2_mreq_ready),
    .mreq_addr_o   (l2_mreq_addr),
    .mresp_valid_i (l2_mresp_valid),
    .mresp_addr_i  (l2_mresp_addr),
    .mresp_data_i  (l2_mresp_data),
    .inv_valid_o   (l2_inv_valid),
    .inv_ready_i   (l2_inv_ready),
    .inv_addr_o    (l2_inv_addr),
    .ev_o          (ev_l2_o)
  );

  if (LLC_EN) begin : g_llc
    logic llc_inv_valid;
    line_addr_t llc_inv_addr;

    ios_cache #(.SIZE_BYTES(LLC_SIZE), .WAYS(LLC_WAYS), .N_MSHR(LLC_MSHR)) u_llc (
      .clk_i, .rst_ni,
      .req_valid_i   (l2_mreq_valid),
      .req_ready_o   (l2_mreq_ready),
      .req_addr_i    (l2_mreq_addr),
      .resp_valid_o  (l2_mresp_valid),
      .resp_addr_o   (l2_mresp_addr),
      .resp_data_o   (l2_mresp_data),
      .inv_valid_i   (l2_inv_valid),
      .inv_ready_o   (l2_inv_ready),
      .inv_addr_i    (l2_inv_addr),
      .mreq_valid_o  (mem_req_valid_o),
      .mreq_ready_i  (mem_req_ready_i),
      .mreq_addr_o   (mem_req_addr_o),
      .mresp_valid_i (mem_resp_valid_i),
      .mresp_addr_i  (mem_resp_addr_i),
      .mresp_data_i  (mem_resp_data_i),
      .inv_valid_o   (llc_inv_valid),
      .inv_ready_i   (1'b1),               // bottom level: nothing below
      .inv_addr_o    (llc_inv_addr),
      .ev_o          (ev_llc_o)
    );
  end else begin : g_no_llc
    // the L2 is the bottom level: its outgoing invalidation (l2_inv_valid,
    // l2_inv_addr) has nowhere to go and is accepted and dropped here
    assign mem_req_valid_o = l2_mreq_valid;
    assign mem_req_addr_o  = l2_mreq_addr;
    assign l2_mreq_ready   = mem_req_ready_i;
    assign l2_mresp_valid  = mem_resp_valid_i;
    assign l2_mresp_addr   = mem_resp_addr_i;
    assign l2_mresp_data   = mem_resp_data_i;
    assign l2_inv_ready    = 1'b1;         // bottom level: nothing below
    assign ev_llc_o        = '0;
  end

endmodule
