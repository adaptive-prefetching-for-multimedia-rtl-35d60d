// miss_pattern_detector: finds constant and alternate miss patterns in the
// data-cache miss stream.
//
// For each miss the detector forms a <stride, interval> pair: the stride is
// the miss address minus the previous miss address, the interval the number
// of clock cycles since the previous miss. It keeps the three previous pairs
// X, Y, Z and compares them with the new pair W. The rule X = Z, Tx = Tz,
// Y = W, Ty = Tw is the original method's alternate-pattern test; when also X = Y
// (all four pairs equal) the pattern is reported as constant, otherwise as
// alternate. The pattern record names the next two expected steps: Z and
// then W, repeating.
//
// Interface: miss_valid/miss_addr give one miss per cycle at most. pattern
// is combinational and valid in the same cycle as the miss that completed
// the pattern; cur_pair shows the pair measured for the current miss.
//
// This design's choices: the test is always over the four most recent
// pairs, also for a constant pattern; a pair whose interval counter
// saturated (more than 2^INTERVAL_W - 2 cycles) or that follows reset has
// no valid interval and never matches; strides wrap modulo 2^ADDR_W.
module miss_pattern_detector
  import apf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       miss_valid,
  input  addr_t      miss_addr,
  output pattern_t   pattern,
  output miss_pair_t cur_pair
);

  localparam interval_t INTERVAL_MAX = '1;

  addr_t      last_addr;
  interval_t  since;        // cycles since the previous miss
  logic       have_last;
  miss_pair_t hist [3];     // hist[0] = Z (newest), hist[1] = Y, hist[2] = X

  // Pair of the current miss (W).
  always_comb begin
    cur_pair.stride   = miss_addr - last_addr;
    cur_pair.interval = since;
    cur_pair.ok       = have_last && (since != INTERVAL_MAX);
  end

  function automatic logic same_pair(miss_pair_t a, miss_pair_t b);
    return a.ok && b.ok && (a.stride == b.stride) && (a.interval == b.interval);
  endfunction

  logic match;
  logic all_equal;

  always_comb begin
    match     = same_pair(hist[2], hist[0]) && same_pair(hist[1], cur_pair);
    all_equal = same_pair(hist[2], hist[1]);

    pattern.valid       = miss_valid && match;
    pattern.kind        = !pattern.valid ? PAT_NONE
                        : all_equal      ? PAT_CONSTANT
                        :                  PAT_ALTERNATE;
    pattern.base        = miss_addr;
    pattern.stride[0]   = hist[0].stride;
    pattern.interval[0] = hist[0].interval;
    pattern.stride[1]   = cur_pair.stride;
    pattern.interval[1] = cur_pair.interval;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_addr <= '0;
      since     <= '0;
      have_last <= 1'b0;
      for (int i = 0; i < 3; i++) hist[i] <= '0;
    end else if (miss_valid) begin
      last_addr <= miss_addr;
      since     <= interval_t'(1);
      have_last <= 1'b1;
      hist[2]   <= hist[1];
      hist[1]   <= hist[0];
      hist[0]   <= cur_pair;
    end else if (since != INTERVAL_MAX) begin
      since <= since + interval_t'(1);
    end
  end

  // A reported pattern always has two valid, measured steps.
  a_pattern_steps : assert property (@(posedge clk) disable iff (!rst_n)
    pattern.valid |-> (pattern.interval[0] != '0) && (pattern.interval[1] != '0));

endmodule
