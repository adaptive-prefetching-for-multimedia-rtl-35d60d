// apf_pkg: types and constants shared by the adaptive prefetcher.
//
// The prefetcher watches the data-cache miss stream. For every miss it
// measures a <stride, interval> pair: the address distance to the previous
// miss (the inter-miss stride) and the number of clock cycles since it (the
// inter-miss interval). A repeating pair sequence is a "miss pattern"; the
// pattern record below carries what the block loader needs to prefetch
// along it. Address and interval widths are this design's choice: 32-bit
// byte addresses, 16-bit interval counters, an 18-cycle memory latency.
package apf_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned INTERVAL_W = 16;
  // Main-memory latency in cycles, as seen by the prefetcher (default).
  localparam int unsigned MEM_LATENCY_DEFAULT = 18;

  typedef logic [ADDR_W-1:0]     addr_t;
  typedef logic [ADDR_W-1:0]     stride_t;    // two's complement, wraps with the address
  typedef logic [INTERVAL_W-1:0] interval_t;  // saturates at all ones

  // One inter-miss step.
  typedef struct packed {
    stride_t   stride;
    interval_t interval;
    logic      ok;        // interval did not saturate and a previous miss existed
  } miss_pair_t;

  typedef enum logic [1:0] {
    PAT_NONE      = 2'd0,
    PAT_CONSTANT  = 2'd1,  // X = Y = Z = W
    PAT_ALTERNATE = 2'd2   // X = Z, Y = W, X != Y
  } pattern_kind_e;

  // Detected pattern, valid in the cycle of the miss that completed it.
  // step[0] is the next expected step after the miss, step[1] the one after;
  // the loader alternates between them.
  typedef struct packed {
    logic          valid;
    pattern_kind_e kind;
    addr_t         base;        // address of the miss that completed the pattern
    stride_t [1:0] stride;
    interval_t [1:0] interval;
  } pattern_t;

endpackage
