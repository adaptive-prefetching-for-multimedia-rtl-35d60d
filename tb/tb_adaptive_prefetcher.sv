// tb_adaptive_prefetcher: end-to-end test of the adaptive prefetcher at its
// default parameters.
//
// The testbench stands in for the processor, the data cache and main
// memory. A trace generator issues loads at fixed cycles (the processor
// does not stall, so miss times follow the trace exactly). Two behavioural
// direct-mapped caches, 2 KB with 16-byte lines, see the same trace: one
// receives the prefetches, the other is a baseline without them. A prefetch
// accepted in cycle c fills its line in cycle c + MEM_LATENCY; a load to a
// line whose prefetch is still on its way counts as a hit.
//
// The trace repeats six kinds of segment, each in a fresh address region:
//   - constant stride 16 bytes every 20 cycles (interval above the latency)
//   - random loads, which break any pattern
//   - alternate pattern: strides +1878353200 / -1878353184 with intervals
//     8 / 71 cycles, like a decoder switching between heap and data segment
//   - constant stride 832 bytes every 8 cycles (interval below the latency)
//   - a hot loop over a few lines (hits)
//   - alternate pattern strides 16 / 816 with intervals 15 / 17
// In every pattern segment the baseline misses on every load, while the
// prefetching cache may miss only on the first five loads (four pairs are
// needed to see the pattern). The test counts each mechanism: constant and
// alternate detection, prefetches issued and used, sequences ended by a
// miss, requests held by a busy port, first requests issued at once because
// the interval is shorter than the latency. Each must occur.
module tb_adaptive_prefetcher;
  import apf_pkg::*;

  localparam int unsigned L        = MEM_LATENCY_DEFAULT;
  localparam int unsigned LINE_B   = 16;
  localparam int unsigned SETS     = 128;   // 2 KB
  localparam int unsigned SEG_LEN  = 40;
  localparam int unsigned ROUNDS   = 25;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        miss_valid = 1'b0;
  logic [31:0] miss_addr = '0;
  logic        pf_valid;
  logic [31:0] pf_addr;
  logic        pf_ready = 1'b1;
  logic [1:0]  pattern_kind;
  logic        pf_active;

  adaptive_prefetcher dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // Caches: tag = full line number, valid bit, prefetched-and-unused bit.
  logic [27:0] tag_p [SETS];
  bit          val_p [SETS];
  bit          pfu_p [SETS];
  logic [27:0] tag_b [SETS];
  bit          val_b [SETS];

  // Prefetches on their way: line and fill cycle.
  logic [27:0] fly_line [$];
  longint      fly_time [$];

  // Trace: (cycle, address) of the loads of the current segment.
  longint      acc_t [$];
  logic [31:0] acc_a [$];
  int          seg_kind;
  int          seg_miss_p, seg_miss_b;

  // Mechanism counters.
  int n_const = 0, n_alt = 0, n_issue = 0, n_used = 0, n_late = 0;
  int n_end = 0, n_hold = 0, n_clamp = 0;
  int tot_miss_p = 0, tot_miss_b = 0, tot_loads = 0;
  bit was_active = 0;
  longint last_pattern_cyc = -1;
  int     last_pattern_t0 = 0;

  function automatic void build_segment(int kind, logic [31:0] region, longint start);
    acc_t.delete(); acc_a.delete();
    case (kind)
      0: for (int i = 0; i < SEG_LEN; i++) begin
           acc_t.push_back(start + 20 * i); acc_a.push_back(region + 16 * i);
         end
      1: for (int i = 0; i < 12; i++) begin
           acc_t.push_back(start + 3 * i + $urandom_range(2));
           acc_a.push_back({$urandom()} & ~32'hF);
         end
      2: begin
           longint t = start;
           logic [31:0] a = region;
           for (int i = 0; i < SEG_LEN / 2; i++) begin
             acc_t.push_back(t);     acc_a.push_back(a);
             acc_t.push_back(t + 8); acc_a.push_back(a + 32'd1878353200);
             t += 8 + 71;
             a += 16;
           end
         end
      3: for (int i = 0; i < SEG_LEN; i++) begin
           acc_t.push_back(start + 8 * i); acc_a.push_back(region + 832 * i);
         end
      4: for (int i = 0; i < 30; i++) begin
           acc_t.push_back(start + 2 * i); acc_a.push_back(region + 16 * (i % 3));
         end
      default: begin
           longint t = start;
           logic [31:0] a = region;
           for (int i = 0; i < SEG_LEN / 2; i++) begin
             acc_t.push_back(t);      acc_a.push_back(a);
             acc_t.push_back(t + 15); acc_a.push_back(a + 16);
             t += 15 + 17;
             a += 16 + 816;
           end
         end
    endcase
  endfunction

  initial begin
    for (int i = 0; i < SETS; i++) begin
      tag_p[i] = '0; val_p[i] = 0; pfu_p[i] = 0; tag_b[i] = '0; val_b[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROUNDS; r++) begin
      for (int k = 0; k < 6; k++) begin
        seg_kind = k;
        build_segment(k, 32'h0100_0000 * (6 * r + k + 1), cyc + 40);
        seg_miss_p = 0; seg_miss_b = 0;
        while (acc_t.size() > 0) begin
          logic [31:0] a;
          logic [27:0] line;
          int          idx;
          bit          access, hit_p, hit_b, in_flight;
          @(negedge clk);
          // Prefetch fills due this cycle land first.
          while (fly_time.size() > 0 && fly_time[0] <= cyc) begin
            idx = int'(fly_line[0] % SETS);
            if (!(val_p[idx] && tag_p[idx] == fly_line[0])) begin
              tag_p[idx] = fly_line[0]; val_p[idx] = 1; pfu_p[idx] = 1;
            end
            void'(fly_line.pop_front()); void'(fly_time.pop_front());
          end
          access = (acc_t.size() > 0 && acc_t[0] == cyc);
          miss_valid = 1'b0;
          if (access) begin
            a    = acc_a[0];
            line = a[31:4];
            idx  = int'(line % SETS);
            void'(acc_t.pop_front()); void'(acc_a.pop_front());
            in_flight = 0;
            foreach (fly_line[j]) if (fly_line[j] == line) in_flight = 1;
            hit_p = (val_p[idx] && tag_p[idx] == line) || in_flight;
            hit_b = (val_b[idx] && tag_b[idx] == line);
            if (in_flight) n_late++;
            if (val_p[idx] && tag_p[idx] == line && pfu_p[idx]) begin n_used++; pfu_p[idx] = 0; end
            if (!hit_p) begin
              tag_p[idx] = line; val_p[idx] = 1; pfu_p[idx] = 0;
              seg_miss_p++;
              miss_valid = 1'b1;
              miss_addr  = a;
            end
            if (!hit_b) begin tag_b[idx] = line; val_b[idx] = 1; seg_miss_b++; end
            tot_loads++;
          end
          // The refill port is busy now and then.
          pf_ready = ($urandom_range(15) != 0);
          #1;
          if (miss_valid) begin
            check(!pf_valid, "no request in a miss cycle");
            if (was_active) n_end++;
            if (pattern_kind == PAT_CONSTANT) n_const++;
            if (pattern_kind == PAT_ALTERNATE) n_alt++;
            if (pattern_kind != PAT_NONE) begin
              last_pattern_cyc = cyc;
              last_pattern_t0  = int'(dut.u_detector.pattern.interval[0]);
            end
          end else begin
            check(pattern_kind == PAT_NONE, "pattern only at a miss");
          end
          if (pf_valid && !pf_ready) n_hold++;
          if (pf_valid && pf_ready) begin
            n_issue++;
            if (last_pattern_cyc == cyc - 1 && last_pattern_t0 <= int'(L)) n_clamp++;
            check(pf_addr[3:0] == 4'h0 || seg_kind == 1, "prefetch address on a line boundary");
            fly_line.push_back(pf_addr[31:4]);
            fly_time.push_back(cyc + L);
          end
          @(posedge clk);
          cyc++;
          was_active = pf_active;
        end
        tot_miss_p += seg_miss_p;
        tot_miss_b += seg_miss_b;
        if (k == 0 || k == 2 || k == 3 || k == 5) begin
          check(seg_miss_b == SEG_LEN, $sformatf("baseline misses on every load (%0d)", seg_miss_b));
          check(seg_miss_p == 5, $sformatf("segment %0d: %0d misses with prefetching, expected 5", k, seg_miss_p));
        end
      end
    end
    check(n_const > 0, "constant pattern detected");
    check(n_alt > 0, "alternate pattern detected");
    check(n_issue > 0, "prefetches issued");
    check(n_used > 0, "prefetched lines used");
    check(n_late > 0, "load met a prefetch still on its way");
    check(n_end > 0, "sequence ended by a miss");
    check(n_hold > 0, "request held by a busy port");
    check(n_clamp > 0, "first request issued at once (interval below latency)");
    check(tot_miss_p < tot_miss_b, "prefetching removes misses");
    $display("loads=%0d misses: baseline=%0d prefetching=%0d (%0d%% fewer)", tot_loads, tot_miss_b,
             tot_miss_p, 100 * (tot_miss_b - tot_miss_p) / tot_miss_b);
    $display("constant=%0d alternate=%0d issued=%0d used=%0d late=%0d ended=%0d held=%0d at_once=%0d",
             n_const, n_alt, n_issue, n_used, n_late, n_end, n_hold, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
