// pcs_pkg: constants and types shared by the PCS (probabilistic controlled
// sharing) L2 cache. The defaults are the main configuration: 8 cores, 64-bit
// addresses, 64 B lines, 4096 tag entries and 2048 data entries per core, of
// which 1024 form the private region P and 1024 the core's slice of the
// shared region sData, and 256 VTag entries per core in the VMON monitor.
// The three probability levels {1/3, 1/2, 3/4} are kept as private-to-shared
// ratios s/(p+s): (s,p) = (1,2), (1,1), (3,1), default level 1/2.
// The 4-way tag organisation (1024 sets) and 2-bit reuse counters are this
// design's choices; the sizes above come from the evaluated configuration.
package pcs_pkg;

  localparam int unsigned N_CORES       = 8;
  localparam int unsigned ADDR_W        = 64;
  localparam int unsigned LINE_BYTES    = 64;
  localparam int unsigned LINE_W        = LINE_BYTES * 8;
  localparam int unsigned TAG_ENTRIES   = 4096;
  localparam int unsigned TAG_WAYS      = 4;
  localparam int unsigned DATA_PER_CORE = 2048;
  localparam int unsigned P_ENTRIES     = 1024;
  localparam int unsigned VMON_ENTRIES  = 256;
  localparam int unsigned REUSE_W       = 2;
  localparam int unsigned CNT_W         = 32;

  // Probability levels, low to high, as (shared, private) placement counts.
  localparam int unsigned N_LEVELS      = 3;
  localparam int unsigned DEFAULT_LEVEL = 1;
  localparam int unsigned LEVEL_S [N_LEVELS] = '{1, 1, 3};
  localparam int unsigned LEVEL_P [N_LEVELS] = '{2, 1, 1};

  // Data region a tag entry points into (the tag entry's s flag).
  typedef enum logic {
    REGION_P = 1'b0,
    REGION_S = 1'b1
  } region_e;

  // One-cycle event pulses of the L2 access flow, for monitoring.
  typedef struct packed {
    logic tag_hit;        // access hit in the core's tag array
    logic tag_miss;       // access missed
    logic vtag_hit;       // miss that hit in the core's VTag buffer
    logic local_repl;     // miss reused the data entry of the LRU tag way
    logic place_p;        // free-way miss placed into the private region
    logic place_s;        // free-way miss placed into sData
    logic evict;          // a valid block was evicted from a data entry
    logic evict_remote;   // an sData eviction took another core's block
    logic writeback;      // a dirty victim was written to memory
    logic reuse_dec;      // the replacement search decremented a reuse count
  } l2_events_t;

endpackage
