// tb_update_buffer: self-checking test of update_buffer (W = 8, DEPTH = 4).
// Random pushes and pops against a queue model; checks FIFO order, that
// in_ready drops exactly when four entries are held or block is high, and
// the fill level. A refused request is held until accepted.
module tb_update_buffer;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, block = 1'b0, in_valid = 1'b0, out_pop = 1'b0;
  logic [7:0] in_line = '0, out_line;
  logic in_ready, out_valid;
  logic [2:0] level;
  int checks = 0, failures = 0, n_full = 0;
  int q[$];
  bit stalled = 1'b0;  // request refused at the last edge: must be held

  update_buffer #(.W(8), .DEPTH(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      block    = ($urandom_range(15) == 0);
      if (!stalled) begin
        in_valid = ($urandom_range(1) == 1);
        in_line  = 8'($urandom);
      end
      out_pop  = ($urandom_range(2) == 0);
      #1;
      check(in_ready == (q.size() < 4 && !block), "in_ready");
      check(out_valid == (q.size() > 0), "out_valid");
      check(int'(level) == q.size(), "level");
      if (q.size() > 0) check(out_line == 8'(q[0]), "out_line order");
      if (q.size() == 4) n_full++;
      @(posedge clk);
      if (out_pop && q.size() > 0) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(int'(in_line));
      stalled = in_valid && !in_ready;
    end
    check(n_full > 0, "buffer became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
