// tb_workload_examples: dumping-overhead workloads for the Greedy tracker.
//
// Part 1, one-interval examples (K = 1, 16 lines): three update patterns
// (lines 0-10; lines 0-3, 6, 8-11; every even line) must dump 11, 12 and
// 15 lines, i.e. an overhead of 0, 18.75 % and 43.75 % of the cache.
// Part 2, full-size shared tracker (K = 32, 32768 lines, default
// parameters): epochs of clustered writes of three kinds (a few long
// streams, many short regions, scattered single lines). For each epoch the
// testbench computes the bit-vector count and the optimal offline cover
// with K intervals (drop the K-1 largest gaps between the first and last
// written line), and checks that the tracker dumped every written line,
// no fewer lines than the optimum, and at most twice the optimum.
// The same epochs also go to the top level built with the 2-lines-per-bit
// vector for the shared L2 (S_METHOD = 1); its dump must be exactly the
// written lines' pairs, in ascending order.
// Overheads (non-updated dumped lines as a share of all lines) are printed.
module tb_workload_examples;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  // Part 1 tracker.
  logic       a_uv = 1'b0, a_ur, a_dreq = 1'b0, a_dv, a_dr = 1'b1, a_dd, a_busy, a_idle;
  logic [3:0] a_ul = '0, a_dl;
  logic [0:0] a_n;
  greedy_update_tracker #(.LINE_W(4), .K(1), .BUF_DEPTH(4)) u_small (.clk, .rst_n,
    .upd_valid(a_uv), .upd_line(a_ul), .upd_ready(a_ur), .dump_req(a_dreq),
    .dump_valid(a_dv), .dump_line(a_dl), .dump_ready(a_dr), .dump_done(a_dd),
    .busy(a_busy), .idle(a_idle), .n_intervals(a_n));

  // Part 2 tracker at its defaults.
  logic        b_uv = 1'b0, b_ur, b_dreq = 1'b0, b_dv, b_dr = 1'b1, b_dd, b_busy, b_idle;
  logic [14:0] b_ul = '0, b_dl;
  logic [5:0]  b_n;
  greedy_update_tracker u_full (.clk, .rst_n,
    .upd_valid(b_uv), .upd_line(b_ul), .upd_ready(b_ur), .dump_req(b_dreq),
    .dump_valid(b_dv), .dump_line(b_dl), .dump_ready(b_dr), .dump_done(b_dd),
    .busy(b_busy), .idle(b_idle), .n_intervals(b_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic small_case(input int lines[$], input int exp_dump, input string name);
    int n = 0;
    foreach (lines[i]) begin
      @(negedge clk);
      a_uv = 1'b1; a_ul = 4'(lines[i]);
      #1;
      while (!a_ur) begin @(negedge clk); #1; end
      @(negedge clk);
      a_uv = 1'b0;
    end
    @(negedge clk);
    a_dreq = 1'b1;
    @(negedge clk);
    a_dreq = 1'b0;
    while (!a_dd) begin
      if (a_dv) n++;
      @(negedge clk);
    end
    check(n == exp_dump, $sformatf("%s: dumped %0d, expected %0d", name, n, exp_dump));
    $display("k=1 %s: %0d updated, %0d dumped, overhead %0.2f %%", name, lines.size(), n,
             100.0 * (n - lines.size()) / 16.0);
  endtask

  // Part 2 comparison: top level with the bit-vector shared tracker; the
  // distributed side is kept small and idle.
  logic        c_ur, c_dv, c_dd;
  logic [14:0] c_dl;
  logic [5:0]  c_n;
  logic [1:0]  c_d_ur, c_d_dv;
  logic [1:0][3:0] c_d_dl;
  logic        c_d_dd;
  update_tracker_top #(.S_METHOD(1), .S_T(2), .D_CACHES(2), .D_C(2), .D_LINE_W(4), .D_K(1))
    u_bv (.clk, .rst_n,
    .s_upd_valid(b_uv), .s_upd_line(b_ul), .s_upd_ready(c_ur), .s_dump_req(b_dreq),
    .s_dump_valid(c_dv), .s_dump_line(c_dl), .s_dump_ready(1'b1), .s_dump_done(c_dd),
    .s_n_intervals(c_n),
    .d_upd_valid(2'b00), .d_upd_line('0), .d_upd_ready(c_d_ur), .d_dump_req(1'b0),
    .d_dump_valid(c_d_dv), .d_dump_line(c_d_dl), .d_dump_ready(2'b11), .d_dump_done(c_d_dd));

  // Optimal offline cover of a bit-vector with k intervals.
  function automatic int offline_dump(input bit bv[], input int k);
    int gaps[$], first = -1, last = -1, run = 0, total;
    foreach (bv[i]) if (bv[i]) begin
      if (first < 0) first = i;
      else if (run > 0) gaps.push_back(run);
      last = i;
      run = 0;
    end else if (first >= 0) run++;
    if (first < 0) return 0;
    total = last - first + 1;
    gaps.rsort();
    for (int i = 0; i < k - 1 && i < gaps.size(); i++) total -= gaps[i];
    return total;
  endfunction

  task automatic full_epoch(input int kind, input int n_upd);
    bit bv[] = new[32768];
    bit bv2[] = new[32768];
    int got = 0, x = 0, opt, line = 0, guard = 0, got2 = 0, prev2 = -1;
    bit ok = 1, ok2 = 1, done1 = 0, done2 = 0;
    for (int i = 0; i < n_upd; i++) begin
      case (kind)
        0: begin  // a few long streams
          if (i % (n_upd / 4) == 0) line = $urandom_range(32767);
          line = (line + 1) % 32768;
        end
        1: begin  // many short regions
          if ($urandom_range(15) == 0) line = $urandom_range(32767);
          else line = (line + $urandom_range(2)) % 32768;
        end
        default: line = $urandom_range(32767);  // scattered
      endcase
      bv[line] = 1'b1;
      bv2[line] = 1'b1;
      bv2[line ^ 1] = 1'b1;
      @(negedge clk);
      b_uv = 1'b1; b_ul = 15'(line);
      #1;
      while (!b_ur) begin @(negedge clk); #1; end
      @(negedge clk);
      b_uv = 1'b0;
    end
    foreach (bv[i]) if (bv[i]) x++;
    opt = offline_dump(bv, 32);
    @(negedge clk);
    b_dreq = 1'b1;
    @(negedge clk);
    b_dreq = 1'b0;
    while (!(done1 && done2) && guard < 100000) begin
      if (b_dv) begin
        got++;
        bv[b_dl] = 1'b0;
      end
      if (c_dv) begin
        got2++;
        if (!bv2[c_dl] || int'(c_dl) <= prev2) ok2 = 0;
        bv2[c_dl] = 1'b0;
        prev2 = int'(c_dl);
      end
      check(c_n == '0, "bit-vector top reports no intervals");
      if (b_dd) done1 = 1;
      if (c_dd) done2 = 1;
      @(negedge clk);
      guard++;
    end
    foreach (bv[i]) if (bv[i]) ok = 0;
    foreach (bv2[i]) if (bv2[i]) ok2 = 0;
    check(ok2, $sformatf("kind %0d: bit-vector dump is exactly the written pairs, ascending", kind));
    check(ok, $sformatf("kind %0d: every written line dumped", kind));
    check(got >= opt, $sformatf("kind %0d: %0d dumped, below optimum %0d", kind, got, opt));
    check(got <= 2 * opt, $sformatf("kind %0d: %0d dumped, above twice optimum %0d", kind, got, opt));
    $display("k=32 kind %0d: updated %0d, offline %0d, greedy %0d lines; overhead offline %0.2f %%, greedy %0.2f %%",
             kind, x, opt, got, 100.0 * (opt - x) / 32768.0, 100.0 * (got - x) / 32768.0);
    $display("          2 lines/bit vector (16384 bits): %0d lines, overhead %0.2f %%",
             got2, 100.0 * (got2 - x) / 32768.0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    small_case('{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10}, 11, "lines 0-10");
    small_case('{6, 0, 11, 1, 2, 3, 8, 9, 10}, 12, "lines 0-3,6,8-11");
    small_case('{8, 0, 2, 14, 4, 6, 10, 12}, 15, "even lines");
    while (!c_ur) @(negedge clk);
    for (int r = 0; r < 2; r++)
      for (int kind = 0; kind < 3; kind++) full_epoch(kind, 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
