// tb_min_global_gap: self-checking test of min_global_gap (W = 15, IW = 5).
// Random sorted interval lists, one interval per cycle from init; checks
// the smallest gap between neighbours and the index of the lower one (ties
// to the lower pair). Includes the worked example <0,2> <5,6> <10,10>:
// gap 2 after interval 0.
module tb_min_global_gap;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, init = 1'b0, en = 1'b0;
  logic [14:0] start_a = '0, end_a = '0, min_gap;
  logic [4:0] idx = '0, min_idx;
  int checks = 0, failures = 0;

  min_global_gap #(.W(15), .IW(5)) dut (.*);

  task automatic scan(input int s[$], input int e[$]);
    int best = 32767, bi = 0, d;
    foreach (s[i]) begin
      @(negedge clk);
      init = (i == 0); en = 1'b1;
      start_a = 15'(s[i]); end_a = 15'(e[i]); idx = 5'(i);
      if (i > 0) begin d = s[i] - e[i-1] - 1; if (d < best) begin best = d; bi = i - 1; end end
    end
    @(negedge clk);
    init = 1'b0; en = 1'b0;
    checks++;
    if (int'(min_gap) != best || (s.size() > 1 && int'(min_idx) != bi)) begin
      failures++;
      $display("FAIL got %0d@%0d want %0d@%0d", min_gap, min_idx, best, bi);
    end
  endtask

  initial begin
    int s[$], e[$], p, n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    scan('{0, 5, 10}, '{2, 6, 10});
    checks++;
    if (min_gap != 2 || min_idx != 0) begin failures++; $display("FAIL example"); end
    for (int t = 0; t < 400; t++) begin
      s.delete(); e.delete();
      n = $urandom_range(32, 1);
      p = $urandom_range(50);
      for (int i = 0; i < n; i++) begin
        s.push_back(p); p += $urandom_range(40);
        e.push_back(p); p += $urandom_range(30, 1);
      end
      scan(s, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
