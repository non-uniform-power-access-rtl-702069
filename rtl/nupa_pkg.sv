// nupa_pkg: shared constants and types of the non-uniform power access (NUPA)
// cache bank.
//
// The bank is a 4 MB, 16-way last-level cache bank with 64-byte lines. Way 0 is
// the low-power way: its data lives in the two central rows of subarrays,
// reached over a low-swing bus laid along the trunk of the H-tree. Ways 1..15
// are the high-power ways, reached over the ordinary full-swing H-tree. Capacity,
// associativity, line size, the 32x32 subarray grid and the single low-power
// way follow the published design; the 32-bit byte address is this design's
// own choice.
//
// A data-array operation (arr_req_t) is what the cache controller sends through
// the region switch and an interconnect to one data region: a read or a masked
// write of one whole line of one way of one set.
package nupa_pkg;

  // Bank geometry
  localparam int unsigned CACHE_BYTES = 4 * 1024 * 1024;  // 4 MB bank
  localparam int unsigned WAYS        = 16;               // 16-way
  localparam int unsigned LP_WAYS     = 1;                // low-power ways (way 0)
  localparam int unsigned HP_WAYS     = WAYS - LP_WAYS;   // high-power ways 1..15
  localparam int unsigned LINE_BYTES  = 64;               // 64-byte lines
  localparam int unsigned LINE_BITS   = LINE_BYTES * 8;
  localparam int unsigned SETS        = CACHE_BYTES / (LINE_BYTES * WAYS);  // 4096

  // Subarray grid of the data array
  localparam int unsigned NDWL        = 32;  // columns of subarrays
  localparam int unsigned NDBL        = 32;  // rows of subarrays
  localparam int unsigned LP_ROWS     = 2;   // central rows on the low-swing bus

  // Addressing (byte address)
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned OFF_W       = $clog2(LINE_BYTES);
  localparam int unsigned SET_W       = $clog2(SETS);
  localparam int unsigned TAG_W       = ADDR_W - OFF_W - SET_W;
  localparam int unsigned WAY_W       = $clog2(WAYS);
  localparam int unsigned LADDR_W     = ADDR_W - OFF_W;  // line address to memory

  typedef logic [LINE_BITS-1:0]  line_t;
  typedef logic [LINE_BYTES-1:0] mask_t;
  typedef logic [TAG_W-1:0]      tag_t;
  typedef logic [SET_W-1:0]      set_t;
  typedef logic [WAY_W-1:0]      way_t;

  // Data-array operation
  typedef struct packed {
    logic  we;     // 1: write wdata under wmask, 0: read the line
    way_t  way;    // global way number (0 = low-power way)
    set_t  set;
    line_t wdata;
    mask_t wmask;  // byte enables of a write
  } arr_req_t;

  // Region select on the controller side of the switch
  typedef enum logic {
    REGION_HP = 1'b0,  // high-power region, default H-tree
    REGION_LP = 1'b1   // low-power region, low-swing trunk bus
  } region_e;

  // Placement mode chosen by the dynamic reconfiguration counter
  typedef enum logic {
    MODE_CONVENTIONAL = 1'b0,  // blocks are not copied into the low-power way
    MODE_PLACEMENT    = 1'b1   // Duplicate policy: touched block copied to way 0
  } mode_e;

  // Merge a masked write into a line
  function automatic line_t merge_line(line_t old_line, line_t new_data, mask_t mask);
    line_t r;
    r = old_line;
    for (int b = 0; b < int'(LINE_BYTES); b++)
      if (mask[b]) r[b*8 +: 8] = new_data[b*8 +: 8];
    return r;
  endfunction

endpackage
