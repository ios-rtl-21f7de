// ios_pkg: types and constants shared by the Invalidation-on-Squash (IOS)
// cache subsystem.
//
// Every cache level works on whole 64-byte lines (the line size used at all
// levels of the evaluated machine), so requests, fills and invalidations carry
// a line address: the byte address with its 6 offset bits dropped. The 32-bit
// physical address width is this design's own choice.
package ios_pkg;

  localparam int unsigned ADDR_W     = 32;                 // byte address width
  localparam int unsigned LINE_BYTES = 64;                 // cache line size
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES); // byte offset bits
  localparam int unsigned LA_W       = ADDR_W - OFF_W;     // line address width
  localparam int unsigned LINE_W     = LINE_BYTES * 8;     // line data width

  typedef logic [LA_W-1:0]   line_addr_t;
  typedef logic [LINE_W-1:0] line_data_t;

  // State of one cache way. LOCKED marks the fake line that an invalidation
  // leaves behind when it meets a miss still in flight: it holds the tag of the
  // line being fetched and tells the fill not to copy the data in.
  typedef enum logic [1:0] {
    LS_INVALID = 2'd0,
    LS_VALID   = 2'd1,
    LS_LOCKED  = 2'd2
  } line_state_e;

  // One-cycle event strobes of a cache level, for statistics and tests.
  typedef struct packed {
    logic hit;        // request hit a valid line
    logic miss;       // request missed and allocated a miss entry
    logic mshr_stall; // request held back (same line in flight or no free entry)
    logic inv_hit;    // invalidation removed a valid line
    logic inv_lock;   // invalidation met an in-flight miss: fake locked line inserted
    logic inv_drop;   // invalidation found nothing to do at this level
    logic fill;       // fill copied into the cache
    logic fill_skip;  // fill met a locked line: copy skipped, fake line released
  } cache_ev_t;

endpackage
