// tb_block_loader: self-checking test of the block loader.
//
// Drives the loader with pattern records and misses directly and compares
// its request port, cycle by cycle, with a reference schedule built from
// absolute times: after a pattern at miss cycle t0 with steps (S0,T0),
// (S1,T1), predicted miss k is due at t0 + T0 + T1 + ... and its prefetch
// may go out from MEM_LATENCY cycles before that (but not before t0 + 1,
// nor in the same cycle as the previous one), at the previous address plus
// the step's stride. pf_ready is randomly low at times to make requests
// wait. Misses without a pattern must end the sequence; misses with one
// restart it. Also checks the cycle of the first request, C = T0 -
// MEM_LATENCY after the miss, for a case with T0 > MEM_LATENCY.
module tb_block_loader;
  import apf_pkg::*;

  localparam int unsigned L = MEM_LATENCY_DEFAULT;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     miss_valid = 1'b0;
  pattern_t pattern = '0;
  logic     pf_valid;
  addr_t    pf_addr;
  logic     pf_ready = 1'b1;
  logic     active;
  logic     phase;

  block_loader dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_issue = 0, n_abort = 0, n_restart = 0, n_stall = 0, n_clamped = 0, n_exact_c = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // Reference state.
  bit        r_active = 0;
  longint    r_due;        // predicted cycle of the miss being prefetched
  longint    r_earliest;   // earliest cycle its request may appear
  addr_t     r_addr;       // its address
  int        r_step;
  longint    r_t0;
  stride_t   r_s [2];
  int        r_t [2];
  bit        r_first;

  function automatic longint max2(longint a, longint b);
    return a > b ? a : b;
  endfunction

  stride_t stride_set [5] = '{32'd16, 32'd832, -32'sd816, 32'd1878353200, -32'sd1878353184};
  int      intv_set   [7] = '{1, 8, 15, 17, 30, 71, 174};

  longint next_miss = 5;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (cyc < 200_000) begin
      @(negedge clk);
      miss_valid = (cyc == next_miss);
      pattern    = '0;
      if (miss_valid) begin
        pattern.valid = ($urandom_range(3) != 0);
        pattern.kind  = pattern.valid ? PAT_ALTERNATE : PAT_NONE;
        pattern.base  = $urandom();
        for (int k = 0; k < 2; k++) begin
          pattern.stride[k]   = stride_set[$urandom_range(4)];
          pattern.interval[k] = interval_t'(intv_set[$urandom_range(6)]);
        end
        // Every eighth pattern: a single long interval to check C exactly.
        if ($urandom_range(7) == 0) pattern.interval[0] = interval_t'(L + 25);
      end
      pf_ready = ($urandom_range(4) != 0);
      #1;
      // Compare the request port.
      begin
        bit exp_valid;
        exp_valid = r_active && !miss_valid && (cyc >= r_earliest);
        check(pf_valid == exp_valid, $sformatf("pf_valid exp %0d", exp_valid));
        if (exp_valid) check(pf_addr == r_addr, "pf_addr");
        check(active == r_active, "active");
        if (pf_valid && !pf_ready) n_stall++;
        // The first request of a sequence appears C = T0 - MEM_LATENCY
        // cycles after the miss when T0 exceeds the latency.
        if (r_active && !miss_valid && r_first && r_t[0] > int'(L) && cyc == r_t0 + r_t[0] - L) begin
          check(pf_valid, "first request C cycles after the miss");
          n_exact_c++;
        end

        if (exp_valid && pf_valid && pf_ready) begin
          n_issue++;
          if (r_first && r_t[0] <= int'(L)) n_clamped++;
          r_first    = 0;
          r_step     ^= 1;
          r_due      = r_due + r_t[r_step];
          r_earliest = max2(r_due - L, cyc + 1);
          r_addr     = r_addr + r_s[r_step];
        end
      end
      if (miss_valid) begin
        if (r_active && !pattern.valid) n_abort++;
        if (r_active && pattern.valid) n_restart++;
        r_active = pattern.valid;
        if (pattern.valid) begin
          r_t0       = cyc;
          r_s[0]     = pattern.stride[0];  r_s[1] = pattern.stride[1];
          r_t[0]     = int'(pattern.interval[0]); r_t[1] = int'(pattern.interval[1]);
          r_step     = 0;
          r_due      = cyc + r_t[0];
          r_earliest = max2(r_due - L, cyc + 1);
          r_addr     = pattern.base + r_s[0];
          r_first    = 1;
        end
        next_miss = cyc + $urandom_range(300, 1);
      end
      @(posedge clk);
      cyc++;
    end
    check(n_issue > 1000, "prefetches issued");
    check(n_abort > 0, "sequence ended by a miss");
    check(n_restart > 0, "sequence restarted by a new pattern");
    check(n_stall > 0, "request waited for ready");
    check(n_clamped > 0, "interval below latency issued at once");
    check(n_exact_c > 0, "first request exactly C cycles after the miss");
    $display("issued=%0d aborted=%0d restarted=%0d stalls=%0d clamped=%0d exactC=%0d",
             n_issue, n_abort, n_restart, n_stall, n_clamped, n_exact_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
