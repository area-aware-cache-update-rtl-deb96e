// tb_update_tracker_top: end-to-end test of update_tracker_top with every
// parameter at its default (shared L2: K = 32 over 32768 lines; distributed
// L2: 16 caches of 4096 lines, eight K = 4 trackers shared by two caches).
//
// Shared side: two epochs of 1500 locally clustered line updates each,
// sent as fast as the tracker accepts them, then a dump with random
// back-pressure. The accepted order is replayed into the reference model;
// the dumped stream must equal the model's intervals and contain every
// written line.
// Distributed side: 14 of the 16 caches write clustered streams at the
// same time (two stay idle); requests reaching each tracker are tapped and
// replayed into one model per tracker; after a dump each cache's stream
// must be exactly its share of the model's intervals.
// Mechanisms counted, each of which must occur: processor stall (Busy),
// dropped update (line already covered), interval extension, insertion
// into a free slot, merge around the smallest Global Gap, interval moves
// that keep the table sorted, arbitration between two caches sharing a
// tracker, dump back-pressure, and a cache that dumps nothing.
module tb_update_tracker_top;
  import interval_model_pkg::*;
  localparam int SW = 15, SK = 32;
  localparam int NC = 16, C = 2, W = 12, K = 4, NT = NC / C, CB = 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic          s_upd_valid = 1'b0, s_upd_ready, s_dump_req = 1'b0, s_dump_valid;
  logic          s_dump_ready = 1'b0, s_dump_done;
  logic [SW-1:0] s_upd_line = '0, s_dump_line;
  logic [5:0]    s_n_intervals;
  logic [NC-1:0] d_upd_valid = '0, d_upd_ready, d_dump_valid, d_dump_ready = '0;
  logic [NC-1:0][W-1:0] d_upd_line = '0, d_dump_line;
  logic d_dump_req = 1'b0, d_dump_done;

  update_tracker_top dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_drop = 0, n_extend = 0, n_insert = 0, n_merge = 0, n_moves = 0;
  int n_conflict = 0, n_backpressure = 0, n_dmerge = 0, n_ddone = 0;
  IntervalModel sm;
  IntervalModel m [NT];
  int written [NC][$];
  bit driving = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- distributed side ----------------
  for (genvar t = 0; t < NT; t++) begin : g_tap
    always @(posedge clk) begin
      int cyc;
      if (rst_n && dut.u_dist.g_trk[t].tu_valid && dut.u_dist.g_trk[t].tu_ready)
        if (m[t].update(int'(dut.u_dist.g_trk[t].tu_line), cyc) == A_MERGE) n_dmerge++;
      if (rst_n && &d_upd_valid[t*C +: C]) n_conflict++;
    end
  end
  always @(posedge clk) if (rst_n && d_dump_done) n_ddone++;

  for (genvar c = 0; c < NC; c++) begin : g_drv
    initial begin
      int line = $urandom_range((1 << W) - 1);
      wait (driving);
      if (c < NC - 2) begin
        for (int i = 0; i < 100; i++) begin
          @(negedge clk);
          if ($urandom_range(4) == 0) line = $urandom_range((1 << W) - 1);
          else line = (line + $urandom_range(3)) % (1 << W);
          d_upd_valid[c] = 1'b1;
          d_upd_line[c]  = W'(line);
          #1;
          while (!d_upd_ready[c]) begin @(negedge clk); #1; end
          @(posedge clk);
          written[c].push_back(line);
          @(negedge clk);
          d_upd_valid[c] = 1'b0;
          repeat ($urandom_range(3)) @(negedge clk);
        end
      end
    end
  end

  task automatic dist_dump();
    int got [NC][$];
    int want[$], guard, own;
    bit hit;
    @(negedge clk);
    d_dump_req = 1'b1;
    @(negedge clk);
    d_dump_req = 1'b0;
    guard = 0;
    while (!d_dump_done && guard < 200000) begin
      d_dump_ready = NC'($urandom) | NC'($urandom);
      #1;
      for (int c = 0; c < NC; c++)
        if (d_dump_valid[c] && d_dump_ready[c]) got[c].push_back(int'(d_dump_line[c]));
      @(negedge clk);
      guard++;
    end
    check(d_dump_done, "distributed dump_done");
    for (int c = 0; c < NC; c++) begin
      want.delete();
      for (int i = 0; i < m[c / C].count(); i++)
        for (int sl = m[c / C].s[i]; sl <= m[c / C].e[i]; sl++) begin
          own = sl >> (W - CB);
          if (own == c % C)
            for (int k = 0; k < C; k++) want.push_back(((sl & ((1 << (W - CB)) - 1)) << CB) | k);
        end
      check(got[c] == want, $sformatf("cache %0d: %0d dumped, model %0d", c, got[c].size(), want.size()));
      foreach (written[c][i]) begin
        hit = 0;
        foreach (got[c][j]) if (got[c][j] == written[c][i]) hit = 1;
        if (!hit) begin check(0, $sformatf("cache %0d line %0d not dumped", c, written[c][i])); break; end
      end
      if (c >= NC - 2) check(got[c].size() == 0, "idle cache dumps nothing");
    end
  endtask

  // ---------------- shared side ----------------
  task automatic shared_epoch(input int n_upd);
    int upd[$], got[$], want[$], cl, cyc, guard;
    action_e a;
    bit hit;
    cl = $urandom_range((1 << SW) - 1);
    for (int i = 0; i < n_upd; i++) begin
      if ($urandom_range(7) == 0) cl = $urandom_range((1 << SW) - 1);
      else cl = (cl + $urandom_range(4)) % (1 << SW);
      @(negedge clk);
      s_upd_valid = 1'b1;
      s_upd_line  = SW'(cl);
      #1;
      while (!s_upd_ready) begin n_stall++; @(negedge clk); #1; end
      @(posedge clk);
      upd.push_back(cl);
      a = sm.update(cl, cyc);
      n_moves += sm.moves;
      case (a)
        A_DROP:   n_drop++;
        A_EXTEND: n_extend++;
        A_INSERT: n_insert++;
        A_MERGE:  n_merge++;
        default: ;
      endcase
      @(negedge clk);
      s_upd_valid = 1'b0;
    end
    @(negedge clk);
    s_dump_req = 1'b1;
    @(negedge clk);
    s_dump_req = 1'b0;
    guard = 0;
    while (!s_dump_done && guard < 400000) begin
      s_dump_ready = ($urandom_range(9) != 0);
      if (!s_dump_ready) n_backpressure++;
      #1;
      if (s_dump_valid && s_dump_ready) got.push_back(int'(s_dump_line));
      @(negedge clk);
      guard++;
    end
    s_dump_ready = 1'b0;
    sm.expand(want);
    check(s_dump_done, "shared dump_done");
    check(got == want, $sformatf("shared dump: %0d lines, model %0d", got.size(), want.size()));
    check(want.size() <= (1 << SW), "dump no larger than the cache");
    foreach (upd[i]) begin
      hit = 0;
      foreach (got[j]) if (got[j] == upd[i]) begin hit = 1; break; end
      if (!hit) begin check(0, $sformatf("shared line %0d not dumped", upd[i])); break; end
    end
    $display("shared epoch: %0d updates, %0d intervals, %0d lines dumped", n_upd, sm.count(), got.size());
    sm.clear();
    @(negedge clk);
    check(s_n_intervals == 0, "shared table empty after dump");
  endtask

  initial begin
    for (int t = 0; t < NT; t++) m[t] = new(K);
    sm = new(SK);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    driving = 1'b1;
    fork
      begin
        shared_epoch(1500);
        shared_epoch(1500);
      end
      begin
        int guard = 0;
        while (guard < 200000) begin
          @(negedge clk);
          guard++;
          if (d_upd_valid == '0 && guard > 5000) break;
        end
        repeat (60) @(negedge clk);
        dist_dump();
      end
    join
    repeat (5) @(negedge clk);
    check(n_ddone == 1, "distributed dump_done pulses once");
    $display("stalls=%0d drops=%0d extends=%0d inserts=%0d merges=%0d moves=%0d",
             n_stall, n_drop, n_extend, n_insert, n_merge, n_moves);
    $display("arbitration conflicts=%0d distributed merges=%0d dump back-pressure=%0d",
             n_conflict, n_dmerge, n_backpressure);
    checks++; if (n_stall == 0)        begin failures++; $display("FAIL no stall"); end
    checks++; if (n_drop == 0)         begin failures++; $display("FAIL no drop"); end
    checks++; if (n_extend == 0)       begin failures++; $display("FAIL no extend"); end
    checks++; if (n_insert == 0)       begin failures++; $display("FAIL no insert"); end
    checks++; if (n_merge == 0)        begin failures++; $display("FAIL no merge"); end
    checks++; if (n_moves == 0)        begin failures++; $display("FAIL no move"); end
    checks++; if (n_conflict == 0)     begin failures++; $display("FAIL no arbitration"); end
    checks++; if (n_dmerge == 0)       begin failures++; $display("FAIL no distributed merge"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
