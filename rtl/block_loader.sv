// block_loader: issues prefetches along a detected miss pattern.
//
// When the detector reports a pattern at a miss (address A, cycle t0), the
// loader predicts the next misses: A + S0 at t0 + T0, then + S1 after T1
// more cycles, then S0/T0 again, alternating. The prefetch for a predicted
// miss is issued MEM_LATENCY cycles before the miss is due, which puts the
// first one C = T0 - MEM_LATENCY cycles after the miss, as the original method
// describes; each prefetch address is the previous (real or predicted) miss
// address plus the stride. The sequence runs until the next cache miss,
// which ends it; if that miss completes a pattern as well, a new sequence
// starts from it in the same cycle.
//
// Timing: a down-counter rem holds the cycles until the predicted miss
// being prefetched (rem = T0 - k in cycle t0 + k; negative once that time
// has passed). pf_valid is raised while
// rem <= MEM_LATENCY, so the first request appears in cycle
// t0 + max(T0 - MEM_LATENCY, 1): when the interval is not longer than the
// memory latency the prefetch goes out in the cycle after the miss. After a
// request is accepted the counter moves on by the next interval, so the
// schedule keeps to the predicted miss times even when requests are
// clamped or stalled.
//
// Interface: pf_valid/pf_addr/pf_ready is a valid/ready request port to
// the cache refill path. A request stays, unchanged, until accepted, except
// that a new cache miss withdraws it: pf_valid is low in a miss cycle (a
// combinational path from miss_valid) and the sequence ends or restarts. This handshake and
// the default MEM_LATENCY are this design's choices; the method names a
// main-memory latency but gives no number.
module block_loader
  import apf_pkg::*;
#(
  parameter int unsigned MEM_LATENCY = MEM_LATENCY_DEFAULT
)(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     miss_valid,
  input  pattern_t pattern,     // from the detector, aligned with miss_valid
  output logic     pf_valid,
  output addr_t    pf_addr,
  input  logic     pf_ready,
  output logic     active,
  output logic     phase        // which pattern step the pending prefetch follows
);

  // rem is signed: it goes below zero when a predicted miss time passes
  // with its request still waiting, so the next due time stays exact.
  localparam int unsigned REM_W = INTERVAL_W + 3;
  typedef logic signed [REM_W-1:0] rem_t;
  localparam rem_t REM_MIN = {1'b1, {(REM_W-1){1'b0}}};

  addr_t           base;
  stride_t   [1:0] stride;
  interval_t [1:0] interval;
  rem_t            rem;
  rem_t            rem_dec;

  always_comb begin
    rem_dec  = (rem == REM_MIN) ? REM_MIN : rem - rem_t'(1);
    pf_valid = active && !miss_valid && (rem <= rem_t'(MEM_LATENCY));
    pf_addr  = base + stride[phase];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      phase    <= 1'b0;
      base     <= '0;
      stride   <= '0;
      interval <= '0;
      rem      <= '0;
    end else if (miss_valid) begin
      // A miss ends any running sequence; a pattern completed by it starts
      // a new one.
      active <= pattern.valid;
      if (pattern.valid) begin
        base     <= pattern.base;
        stride   <= pattern.stride;
        interval <= pattern.interval;
        phase    <= 1'b0;
        rem      <= rem_t'({1'b0, pattern.interval[0]}) - rem_t'(1);
      end
    end else if (active) begin
      if (pf_valid && pf_ready) begin
        base  <= pf_addr;
        phase <= ~phase;
        rem   <= rem_dec + rem_t'({1'b0, interval[~phase]});
      end else begin
        rem <= rem_dec;
      end
    end
  end

  // A waiting request holds still unless a miss withdraws it.
  a_pf_hold : assert property (@(posedge clk) disable iff (!rst_n)
    (pf_valid && !pf_ready) |=> (miss_valid || (pf_valid && $stable(pf_addr))));

  initial begin
    assert (MEM_LATENCY < 2 ** INTERVAL_W)
      else $error("MEM_LATENCY must be below the interval range");
  end

endmodule
