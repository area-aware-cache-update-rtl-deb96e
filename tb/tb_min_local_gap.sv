// tb_min_local_gap: self-checking test of min_local_gap (W = 15, IW = 5).
// Presents random sorted interval lists one interval per cycle, starting
// with init, and checks the final minimum Local Gap, its index (ties go to
// the lower index) and the side to extend. Includes the worked example:
// line 7 against <0,3> <9,10> <14,15> gives gap 1 at interval 1, start side.
module tb_min_local_gap;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, init = 1'b0, en = 1'b0;
  logic [14:0] line = '0, start_a = '0, end_a = '0, min_gap;
  logic [4:0] idx = '0, min_idx;
  logic min_ext_start;
  int checks = 0, failures = 0;

  min_local_gap #(.W(15), .IW(5)) dut (.*);

  task automatic scan(input int l, input int s[$], input int e[$]);
    int best = 32767, bi = 0; bit bs = 0; int d;
    foreach (s[i]) begin
      @(negedge clk);
      init = (i == 0); en = 1'b1; line = 15'(l);
      start_a = 15'(s[i]); end_a = 15'(e[i]); idx = 5'(i);
      if (l < s[i]) begin d = s[i] - l - 1; if (d < best) begin best = d; bi = i; bs = 1; end end
      else if (l > e[i]) begin d = l - e[i] - 1; if (d < best) begin best = d; bi = i; bs = 0; end end
    end
    @(negedge clk);
    init = 1'b0; en = 1'b0;
    checks++;
    if (int'(min_gap) != best || int'(min_idx) != bi || min_ext_start != bs) begin
      failures++;
      $display("FAIL line %0d: got %0d@%0d/%0b want %0d@%0d/%0b", l, min_gap, min_idx,
               min_ext_start, best, bi, bs);
    end
  endtask

  initial begin
    int s[$], e[$], p, n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    scan(7, '{0, 9, 14}, '{3, 10, 15});
    checks++;
    if (min_gap != 1 || min_idx != 1 || !min_ext_start) begin failures++; $display("FAIL example"); end
    for (int t = 0; t < 400; t++) begin
      s.delete(); e.delete();
      n = $urandom_range(32, 1);
      p = $urandom_range(50);
      for (int i = 0; i < n; i++) begin
        s.push_back(p); p += $urandom_range(40);
        e.push_back(p); p += $urandom_range(60, 2);
      end
      scan($urandom_range(p), s, e);
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
