// tb_check_interval: self-checking test of check_interval (W = 15).
// Edge cases at both ends of an interval and random triples.
module tb_check_interval;
  logic [14:0] line, start_a, end_a;
  logic member, below, above;
  int checks = 0, failures = 0;

  check_interval #(.W(15)) dut (.*);

  task automatic try(input int l, input int s, input int e);
    line = 15'(l); start_a = 15'(s); end_a = 15'(e);
    #1;
    checks++;
    if (member != (l >= s && l <= e) || below != (l < s) || above != (l > e)) begin
      failures++;
      $display("FAIL line %0d in <%0d,%0d>: m%0b b%0b a%0b", l, s, e, member, below, above);
    end
  endtask

  initial begin
    try(9, 9, 10); try(10, 9, 10); try(8, 9, 10); try(11, 9, 10);
    try(0, 0, 0); try(32767, 0, 32767); try(7, 7, 7);
    for (int i = 0; i < 2000; i++) begin
      automatic int s = $urandom_range(32767);
      automatic int e = $urandom_range(32767 - s) + s;
      try($urandom_range(32767), s, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
