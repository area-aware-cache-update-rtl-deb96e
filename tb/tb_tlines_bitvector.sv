// Self-checking test of the t-lines/bit vector tracker at three sizes:
// the default (32768 lines, 2 lines per bit), a small one (256 lines,
// 4 lines per bit, 8-bit words) and a 16-line one with 2 lines per bit
// for three short examples: lines 0-10, lines 0-3, 6, 8-11 and the eight
// even lines, which must dump 12, 10 and 16 lines. Random writes go in back to
// back; each dump is compared line by line with the expected expansion of
// the written groups, under random dump back-pressure.
module tb_tlines_bitvector;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---- instance A: defaults ----
  logic        a_uv, a_ur, a_dreq, a_dv, a_dr, a_dd, a_busy;
  logic [14:0] a_ul, a_dl;
  tlines_bitvector u_a (
    .clk, .rst_n, .upd_valid(a_uv), .upd_line(a_ul), .upd_ready(a_ur),
    .dump_req(a_dreq), .dump_valid(a_dv), .dump_line(a_dl), .dump_ready(a_dr),
    .dump_done(a_dd), .busy(a_busy));

  // ---- instance B: 256 lines, 4 lines per bit, 8-bit words ----
  logic        b_uv, b_ur, b_dreq, b_dv, b_dr, b_dd, b_busy;
  logic [7:0]  b_ul, b_dl;
  tlines_bitvector #(.LINE_W(8), .T(4), .WORD(8)) u_b (
    .clk, .rst_n, .upd_valid(b_uv), .upd_line(b_ul), .upd_ready(b_ur),
    .dump_req(b_dreq), .dump_valid(b_dv), .dump_line(b_dl), .dump_ready(b_dr),
    .dump_done(b_dd), .busy(b_busy));

  // ---- instance C: 16 lines, 2 lines per bit ----
  logic        e_uv, e_ur, e_dreq, e_dv, e_dd, e_busy;
  logic [3:0]  e_ul, e_dl;
  tlines_bitvector #(.LINE_W(4), .T(2)) u_c (
    .clk, .rst_n, .upd_valid(e_uv), .upd_line(e_ul), .upd_ready(e_ur),
    .dump_req(e_dreq), .dump_valid(e_dv), .dump_line(e_dl), .dump_ready(1'b1),
    .dump_done(e_dd), .busy(e_busy));

  task automatic small_case(input int lines[$], input int exp_dump, input string name);
    int n = 0, guard = 0;
    bit seen [16];
    foreach (lines[i]) begin
      @(negedge clk);
      e_uv = 1'b1; e_ul = 4'(lines[i]);
      check(e_ur && !e_busy, {name, ": update refused"});
    end
    @(negedge clk); e_uv = 1'b0; e_dreq = 1'b1;
    @(negedge clk); e_dreq = 1'b0;
    while (!e_dd && guard < 100) begin
      if (e_dv) begin n++; seen[e_dl] = 1'b1; end
      @(negedge clk);
      guard++;
    end
    foreach (lines[i]) check(seen[lines[i]], $sformatf("%s: line %0d not dumped", name, lines[i]));
    check(n == exp_dump, $sformatf("%s: dumped %0d lines, expected %0d", name, n, exp_dump));
  endtask

  // One epoch on instance A: n writes (clustered), then a dump.
  task automatic epoch_a(int n, int ready_pct);
    bit grp [int];
    int exp_lines [$];
    int got = 0, cyc = 0, base;
    base = $urandom_range(0, 32767);
    for (int i = 0; i < n; i++) begin
      int l;
      l = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 32767)
                                      : (base + $urandom_range(0, 300)) % 32768;
      @(negedge clk);
      a_uv = 1; a_ul = 15'(l);
      check(a_ur, "A: update refused while running");
      grp[l / 2] = 1;
    end
    @(negedge clk); a_uv = 0;
    foreach (grp[g]) begin
      exp_lines.push_back(2 * g);
      exp_lines.push_back(2 * g + 1);
    end
    a_dreq = 1;
    @(negedge clk); a_dreq = 0;
    check(!a_ur && a_busy, "A: busy during dump");
    while (!a_dd) begin
      a_dr = ($urandom_range(0, 99) < ready_pct);
      #1;
      if (a_dv && a_dr) begin
        if (got < exp_lines.size())
          check(int'(a_dl) == exp_lines[got],
                $sformatf("A: dump line %0d is %0d, expected %0d", got, a_dl, exp_lines[got]));
        else check(0, "A: extra dump line");
        got++;
      end
      check(!a_ur, "A: update accepted during dump");
      @(negedge clk);
      if (++cyc > 400_000) begin check(0, "A: dump hang"); break; end
    end
    a_dr = 0;
    check(got == exp_lines.size(),
          $sformatf("A: dumped %0d lines, expected %0d", got, exp_lines.size()));
    @(negedge clk);
    check(a_ur, "A: ready after dump");
  endtask

  // One epoch on instance B with random update gaps and hold checks.
  task automatic epoch_b(int n, int ready_pct);
    bit grp [int];
    int exp_lines [$];
    int got = 0, cyc = 0;
    logic [7:0] held;
    bit         pend;
    for (int i = 0; i < n; i++) begin
      int l;
      l = $urandom_range(0, 255);
      @(negedge clk);
      b_uv = ($urandom_range(0, 2) != 0);
      b_ul = 8'(l);
      if (b_uv) grp[l / 4] = 1;
    end
    @(negedge clk); b_uv = 0;
    foreach (grp[g]) for (int s = 0; s < 4; s++) exp_lines.push_back(4 * g + s);
    b_dreq = 1;
    @(negedge clk); b_dreq = 0;
    pend = 0;
    while (!b_dd) begin
      b_dr = ($urandom_range(0, 99) < ready_pct);
      #1;
      check(b_busy == !b_ur, "B: busy is not the inverse of ready");
      if (pend) check(b_dv && b_dl == held, "B: offered line not held");
      pend = b_dv && !b_dr;
      held = b_dl;
      if (b_dv && b_dr) begin
        if (got < exp_lines.size())
          check(int'(b_dl) == exp_lines[got],
                $sformatf("B: dump line %0d is %0d, expected %0d", got, b_dl, exp_lines[got]));
        else check(0, "B: extra dump line");
        got++;
      end
      @(negedge clk);
      if (++cyc > 10_000) begin check(0, "B: dump hang"); break; end
    end
    b_dr = 0;
    check(got == exp_lines.size(),
          $sformatf("B: dumped %0d lines, expected %0d", got, exp_lines.size()));
  endtask

  int wait_a;
  initial begin
    a_uv = 0; a_ul = 0; a_dreq = 0; a_dr = 0;
    b_uv = 0; b_ul = 0; b_dreq = 0; b_dr = 0;
    e_uv = 0; e_ul = 0; e_dreq = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Clearing after reset: 512 words at the default size.
    wait_a = 0;
    while (!a_ur) begin @(negedge clk); wait_a++; end
    check(wait_a >= 500 && wait_a <= 520, $sformatf("A: clear took %0d cycles", wait_a));
    check(b_ur, "B: ready after clearing");
    small_case('{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10}, 12, "lines 0-10");
    small_case('{0, 1, 2, 3, 6, 8, 9, 10, 11}, 10, "lines 0-3,6,8-11");
    small_case('{0, 2, 4, 6, 8, 10, 12, 14}, 16, "even lines");

    // Empty dump: no lines, done after one pass over the words.
    epoch_a(0, 100);
    epoch_a(1, 100);
    epoch_a(200, 100);
    epoch_a(500, 60);
    epoch_a(1500, 30);
    for (int e = 0; e < 6; e++) epoch_b($urandom_range(0, 120), $urandom_range(20, 100));
    epoch_b(1000, 50);   // nearly every group written
    epoch_b(0, 100);

    // Reset in the middle of an epoch clears the vector.
    @(negedge clk); b_uv = 1; b_ul = 8'd77;
    @(negedge clk); b_uv = 0; rst_n = 0;
    @(negedge clk); rst_n = 1;
    while (!b_ur) @(negedge clk);
    epoch_b(0, 100);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
