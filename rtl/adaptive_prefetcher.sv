// adaptive_prefetcher: data-cache prefetcher that adapts to the miss
// pattern of the running program.
//
// The miss pattern detector turns the cache's miss stream into
// <stride, interval> pairs and recognises constant and alternate patterns;
// the block loader then prefetches the blocks the pattern predicts, each one
// main-memory latency ahead of its predicted miss, until a new miss occurs.
// These two units and their roles follow the published adaptive-prefetching method; the widths, the
// request handshake and the latency default are this design's choices.
//
// Interface: miss_valid/miss_addr, one pulse per data-cache miss (the
// address of the missing access). pf_valid/pf_addr/pf_ready, prefetch
// requests to the cache refill path (see block_loader). pattern_kind shows
// the kind of pattern found at the current miss (PAT_NONE otherwise),
// pf_active whether a prefetch sequence is running.
module adaptive_prefetcher
  import apf_pkg::*;
#(
  parameter int unsigned MEM_LATENCY = MEM_LATENCY_DEFAULT
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  miss_valid,
  input  logic [ADDR_W-1:0]     miss_addr,
  output logic                  pf_valid,
  output logic [ADDR_W-1:0]     pf_addr,
  input  logic                  pf_ready,
  output logic [1:0]            pattern_kind,
  output logic                  pf_active
);

  pattern_t   pattern;
  miss_pair_t cur_pair;
  logic       phase;

  miss_pattern_detector u_detector (
    .clk       (clk),
    .rst_n     (rst_n),
    .miss_valid(miss_valid),
    .miss_addr (miss_addr),
    .pattern   (pattern),
    .cur_pair  (cur_pair)
  );

  block_loader #(.MEM_LATENCY(MEM_LATENCY)) u_loader (
    .clk       (clk),
    .rst_n     (rst_n),
    .miss_valid(miss_valid),
    .pattern   (pattern),
    .pf_valid  (pf_valid),
    .pf_addr   (pf_addr),
    .pf_ready  (pf_ready),
    .active    (pf_active),
    .phase     (phase)
  );

  assign pattern_kind = pattern.kind;

endmodule
