// tb_distributed_tracker: self-checking test of distributed_tracker at its
// defaults (16 caches of 4096 lines, trackers shared by C = 2 caches,
// K = 4, four-entry buffers).
// Every cache writes a random, locally clustered stream of lines and holds
// each request until accepted. The request order seen at each tracker is
// tapped and replayed into a reference model. After the epoch a dump is
// requested; each cache's dump stream must be exactly the expansion of its
// tracker's model intervals, every written line must be dumped, a cache
// that wrote nothing must receive nothing, and dump_done must pulse once.
module tb_distributed_tracker;
  import interval_model_pkg::*;
  localparam int NC = 16, C = 2, W = 12, K = 4, NT = NC / C, CB = 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic [NC-1:0] upd_valid = '0, upd_ready, dump_valid, dump_ready = '0;
  logic [NC-1:0][W-1:0] upd_line = '0, dump_line;
  logic dump_req = 1'b0, dump_done;

  distributed_tracker u_dist (.*);

  int checks = 0, failures = 0, n_stall = 0, n_conflict = 0, n_merge = 0, n_done = 0;
  IntervalModel m [NT];
  int written [NC][$];
  bit driving = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Tap each tracker's input and replay it into the model.
  for (genvar t = 0; t < NT; t++) begin : g_tap
    always @(posedge clk) begin
      int cyc;
      if (rst_n && u_dist.g_trk[t].tu_valid && u_dist.g_trk[t].tu_ready)
        if (m[t].update(int'(u_dist.g_trk[t].tu_line), cyc) == A_MERGE) n_merge++;
      if (rst_n && &upd_valid[t*C +: C]) n_conflict++;
    end
  end
  always @(posedge clk) if (rst_n && dump_done) n_done++;

  // One driver per cache; caches 14 and 15 stay idle.
  for (genvar c = 0; c < NC; c++) begin : g_drv
    initial begin
      int line = $urandom_range((1 << W) - 1);
      wait (driving);
      if (c < NC - 2) begin
        for (int i = 0; i < 120; i++) begin
          @(negedge clk);
          if ($urandom_range(4) == 0) line = $urandom_range((1 << W) - 1);
          else line = (line + $urandom_range(3)) % (1 << W);
          upd_valid[c] = 1'b1;
          upd_line[c]  = W'(line);
          #1;
          while (!upd_ready[c]) begin n_stall++; @(negedge clk); #1; end
          @(posedge clk);
          written[c].push_back(line);
          @(negedge clk);
          upd_valid[c] = 1'b0;
          repeat ($urandom_range(3)) @(negedge clk);
        end
      end
    end
  end

  initial begin
    int got [NC][$];
    int want[$], guard, s, own;
    bit hit;
    for (int t = 0; t < NT; t++) m[t] = new(K);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    driving = 1'b1;
    guard = 0;
    while (guard < 200000) begin
      @(negedge clk);
      guard++;
      if (upd_valid == '0 && guard > 5000) break;
    end
    repeat (60) @(negedge clk);
    dump_req = 1'b1;
    @(negedge clk);
    dump_req = 1'b0;
    guard = 0;
    while (!dump_done && guard < 200000) begin
      dump_ready = NC'($urandom) | NC'($urandom);
      #1;
      for (int c = 0; c < NC; c++)
        if (dump_valid[c] && dump_ready[c]) got[c].push_back(int'(dump_line[c]));
      @(negedge clk);
      guard++;
    end
    check(dump_done, "dump_done");
    repeat (5) @(negedge clk);
    check(n_done == 1, $sformatf("dump_done pulses once (%0d)", n_done));
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
    checks++;
    if (n_stall == 0 || n_conflict == 0 || n_merge == 0) begin
      failures++;
      $display("FAIL mechanisms: stall %0d conflict %0d merge %0d", n_stall, n_conflict, n_merge);
    end
    $display("stalls=%0d conflicts=%0d merges=%0d", n_stall, n_conflict, n_merge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
