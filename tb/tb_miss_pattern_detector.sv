// tb_miss_pattern_detector: self-checking test of the miss pattern detector.
//
// Generates miss streams in segments: random misses, constant patterns and
// alternate patterns, with strides and intervals drawn partly from values
// typical of an MPEG4 decoder's miss stream (16, 832, -816, +-1.88e9 bytes;
// 8 to 2689 cycles), plus one gap long enough to saturate the interval
// counter. A reference model keeps its own list of miss cycles and
// addresses, forms the pairs from them and checks every cycle's pattern
// output (valid, kind, both steps) and every miss's measured pair.
module tb_miss_pattern_detector;
  import apf_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       miss_valid = 1'b0;
  addr_t      miss_addr = '0;
  pattern_t   pattern;
  miss_pair_t cur_pair;

  miss_pattern_detector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_const = 0, n_alt = 0, n_sat = 0;
  longint cyc = 0;

  // Reference history: last five misses (time, address).
  longint ref_t [$];
  addr_t  ref_a [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // Reference pair between misses i-1 and i of the history.
  function automatic void ref_pair(int i, output stride_t s, output longint t, output bit ok);
    s  = ref_a[i] - ref_a[i-1];
    t  = ref_t[i] - ref_t[i-1];
    ok = (t < 64'(2**INTERVAL_W - 1));
  endfunction

  // Pattern schedule.
  stride_t   seg_s [2];
  int        seg_t [2];
  int        seg_left = 0;
  int        seg_mode = 0;  // 0 random, 1 constant, 2 alternate
  int        seg_idx = 0;
  longint    next_miss = 3;
  addr_t     addr_now = 32'h1000_0000;

  stride_t stride_set [6] = '{32'd16, 32'd832, -32'sd816, 32'd1878353200, -32'sd1878353184, 32'd131088};
  int      intv_set   [6] = '{8, 15, 17, 71, 174, 2689};

  task automatic new_segment();
    seg_mode = $urandom_range(2);
    seg_left = $urandom_range(10, 4);
    seg_idx  = 0;
    for (int k = 0; k < 2; k++) begin
      seg_s[k] = stride_set[$urandom_range(5)];
      seg_t[k] = intv_set[$urandom_range(5)];
    end
    if (seg_mode == 2 && seg_s[0] == seg_s[1] && seg_t[0] == seg_t[1]) seg_t[1] = seg_t[0] + 1;
  endtask

  task automatic schedule_next(output longint gap, output stride_t s);
    if (seg_left == 0) new_segment();
    seg_left--;
    case (seg_mode)
      0: begin s = $urandom(); gap = $urandom_range(40, 1); end
      1: begin s = seg_s[0];   gap = seg_t[0]; end
      default: begin s = seg_s[seg_idx]; gap = seg_t[seg_idx]; seg_idx ^= 1; end
    endcase
  endtask

  int n_miss = 0;
  bit sat_done = 0;

  initial begin
    longint gap;
    stride_t s;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (n_miss < 3000) begin
      @(negedge clk);
      miss_valid = (cyc == next_miss);
      miss_addr  = miss_valid ? addr_now : addr_t'($urandom());
      #1;
      if (miss_valid) begin
        bit exp_valid;
        bit exp_const;
        stride_t sw, sz, sy, sx;
        longint  tw, tz, ty, tx;
        bit      okw, okz, oky, okx;
        ref_t.push_back(cyc);
        ref_a.push_back(addr_now);
        if (ref_t.size() > 5) begin void'(ref_t.pop_front()); void'(ref_a.pop_front()); end
        exp_valid = 0; exp_const = 0;
        if (ref_t.size() >= 2) begin
          ref_pair(ref_t.size()-1, sw, tw, okw);
          check(cur_pair.ok == okw, "pair ok flag");
          check(cur_pair.stride == sw, "pair stride");
          if (okw) check(longint'(cur_pair.interval) == tw, "pair interval");
          if (!okw) n_sat++;
        end else begin
          check(cur_pair.ok == 1'b0, "first miss has no pair");
        end
        if (ref_t.size() == 5) begin
          ref_pair(1, sx, tx, okx);
          ref_pair(2, sy, ty, oky);
          ref_pair(3, sz, tz, okz);
          exp_valid = okx && oky && okz && okw && sx == sz && tx == tz && sy == sw && ty == tw;
          exp_const = exp_valid && sx == sy && tx == ty;
          if (exp_valid) begin
            check(pattern.stride[0] == sz && longint'(pattern.interval[0]) == tz, "step 0");
            check(pattern.stride[1] == sw && longint'(pattern.interval[1]) == tw, "step 1");
            check(pattern.base == addr_now, "base address");
          end
        end
        check(pattern.valid == exp_valid, $sformatf("pattern valid exp %0d", exp_valid));
        check(pattern.kind == (!exp_valid ? PAT_NONE : exp_const ? PAT_CONSTANT : PAT_ALTERNATE),
              "pattern kind");
        if (pattern.valid && pattern.kind == PAT_CONSTANT) n_const++;
        if (pattern.valid && pattern.kind == PAT_ALTERNATE) n_alt++;
        n_miss++;
        schedule_next(gap, s);
        if (n_miss == 1500 && !sat_done) begin gap = 70000; sat_done = 1; end
        next_miss = cyc + gap;
        addr_now  = addr_now + s;
      end else begin
        check(pattern.valid == 1'b0, "no pattern without a miss");
      end
      @(posedge clk);
      cyc++;
    end
    check(n_const > 0, "constant patterns seen");
    check(n_alt > 0, "alternate patterns seen");
    check(n_sat > 0, "saturated interval seen");
    $display("constant=%0d alternate=%0d saturated=%0d misses=%0d", n_const, n_alt, n_sat, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
