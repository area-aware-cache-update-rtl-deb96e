// tb_greedy_update_tracker: self-checking test of greedy_update_tracker.
//
// Five harnesses run in parallel: the three worked examples of the Greedy
// algorithm at k = 2 and k = 3 on 16 lines, random single requests with
// exact cycle counts (k = 8, 256 lines), and a random clustered stream
// that fills the Update Buffer (k = 8, 256 lines). Each checks the
// Interval Table against a reference model after every request and the
// dumped line stream at the end of each epoch.
module tb_greedy_update_tracker;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 5;
  logic [NH-1:0] done;
  int chk [NH], fl [NH], st [NH], dr [NH], ex [NH], in [NH], mg [NH], mv [NH];
  int checks, failures;

  tracker_harness #(.K(2), .W(4), .MODE(0)) h0 (.clk, .done(done[0]), .checks(chk[0]), .failures(fl[0]),
    .n_stall(st[0]), .n_drop(dr[0]), .n_extend(ex[0]), .n_insert(in[0]), .n_merge(mg[0]), .n_moves(mv[0]));
  tracker_harness #(.K(3), .W(4), .MODE(1)) h1 (.clk, .done(done[1]), .checks(chk[1]), .failures(fl[1]),
    .n_stall(st[1]), .n_drop(dr[1]), .n_extend(ex[1]), .n_insert(in[1]), .n_merge(mg[1]), .n_moves(mv[1]));
  tracker_harness #(.K(3), .W(4), .MODE(2)) h2 (.clk, .done(done[2]), .checks(chk[2]), .failures(fl[2]),
    .n_stall(st[2]), .n_drop(dr[2]), .n_extend(ex[2]), .n_insert(in[2]), .n_merge(mg[2]), .n_moves(mv[2]));
  tracker_harness #(.K(8), .W(8), .MODE(3), .N_UPD(300)) h3 (.clk, .done(done[3]), .checks(chk[3]), .failures(fl[3]),
    .n_stall(st[3]), .n_drop(dr[3]), .n_extend(ex[3]), .n_insert(in[3]), .n_merge(mg[3]), .n_moves(mv[3]));
  tracker_harness #(.K(8), .W(8), .MODE(4), .N_UPD(300)) h4 (.clk, .done(done[4]), .checks(chk[4]), .failures(fl[4]),
    .n_stall(st[4]), .n_drop(dr[4]), .n_extend(ex[4]), .n_insert(in[4]), .n_merge(mg[4]), .n_moves(mv[4]));

  initial begin
    int cycles = 0;
    while (done != '1 && cycles < 400000) begin
      @(posedge clk);
      cycles++;
    end
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    if (done != '1) begin
      failures++;
      $display("FAIL watchdog: harnesses not finished (%b)", done);
    end
    checks++;
    if (st[4] == 0) begin failures++; $display("FAIL no buffer stall seen"); end
    checks++;
    if (mg[3] == 0 || in[3] == 0 || ex[3] == 0 || dr[3] == 0) begin
      failures++; $display("FAIL random run missed an action");
    end
    $display("stalls=%0d drops=%0d extends=%0d inserts=%0d merges=%0d moves=%0d",
             st[4], dr[3] + dr[4], ex[3] + ex[4], in[3] + in[4], mg[3] + mg[4], mv[3] + mv[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
