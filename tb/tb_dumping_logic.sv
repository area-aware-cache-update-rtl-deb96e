// tb_dumping_logic: self-checking test of dumping_logic (W = 15, K = 32).
// A table model answers the read port. Random sorted tables (including an
// empty one and a full one) are dumped with random back-pressure; the
// streamed lines must be exactly the covered lines in order, and with
// dump_ready held high a dump must take one cycle per line plus one per
// interval.
module tb_dumping_logic;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, start = 1'b0, dump_ready = 1'b0;
  logic [5:0] count = '0;
  logic [4:0] rd_idx;
  logic [14:0] rd_start, rd_end, dump_line;
  logic dump_valid, busy, done;
  int checks = 0, failures = 0;
  int ts[32], te[32];

  assign rd_start = 15'(ts[rd_idx]);
  assign rd_end   = 15'(te[rd_idx]);

  dumping_logic #(.W(15), .K(32)) dut (.*);

  task automatic run(input int n, input int ready_pct);
    int got[$], want[$], cyc = 0, lines = 0;
    for (int i = 0; i < n; i++)
      for (int l = ts[i]; l <= te[i]; l++) want.push_back(l);
    @(negedge clk);
    count = 6'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 100000) begin
      dump_ready = ($urandom_range(99) < ready_pct);
      #1;
      if (dump_valid && dump_ready) got.push_back(int'(dump_line));
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL n=%0d: %0d lines, want %0d", n, got.size(), want.size());
    end
    if (ready_pct == 100) begin
      checks++;
      if (cyc != want.size() + n) begin
        failures++;
        $display("FAIL n=%0d: %0d cycles, want %0d", n, cyc, want.size() + n);
      end
    end
  endtask

  task automatic fill(input int n);
    int p = $urandom_range(100);
    for (int i = 0; i < n; i++) begin
      ts[i] = p; p += $urandom_range(20);
      te[i] = p; p += $urandom_range(50, 2);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(0, 100);
    fill(32); run(32, 100);
    for (int t = 0; t < 40; t++) begin
      automatic int n = $urandom_range(32, 1);
      fill(n);
      run(n, (t % 2) ? 100 : 50);
    end
    ts[0] = 32760; te[0] = 32767; run(1, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
