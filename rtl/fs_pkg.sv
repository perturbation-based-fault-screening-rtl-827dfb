// Shared types and default sizes of the invariance-based fault screener.
//
// The screener watches the addresses of loads and stores and the data of
// stores, and flags a perturbation when a bit that has so far never changed
// for a static instruction changes. The sizes below are those of the
// reference configuration: a 1K-entry table of 32-bit address bitmasks, a
// 512-entry table of 64-bit store-data bitmasks, and a full reset of both
// tables every 10 million instructions. The cause encoding and the tag width
// are this design's own choices.
package fs_pkg;

  localparam int unsigned ADDR_ENTRIES_DEF   = 1024;
  localparam int unsigned DATA_ENTRIES_DEF   = 512;
  localparam int unsigned ADDR_W_DEF         = 32;
  localparam int unsigned DATA_W_DEF         = 64;
  localparam int unsigned RESET_INTERVAL_DEF = 10_000_000;

  // Which check raised a flush request (several bits may be set at once).
  typedef struct packed {
    logic addr_value;  // invariant bit of the load/store address changed
    logic addr_delta;  // invariant bit of the address delta changed
    logic data_value;  // invariant bit of the store data changed
    logic data_delta;  // invariant bit of the store-data delta changed
  } flush_cause_t;

endpackage
