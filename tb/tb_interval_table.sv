// tb_interval_table: self-checking test of interval_table (K = 32, W = 15).
// Random writes and reads against an array model; checks that a read is
// asynchronous and that a write shows from the next cycle on.
module tb_interval_table;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [4:0]  rd_addr = '0, wr_addr = '0;
  logic [14:0] rd_start, rd_end, wr_start = '0, wr_end = '0;
  logic        we = 1'b0;
  int checks = 0, failures = 0;
  int ms[32], me[32];
  bit vld[32];

  interval_table #(.K(32), .W(15)) dut (.*);

  initial begin
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1'b1; wr_addr = 5'(i); wr_start = 15'(i * 100); wr_end = 15'(i * 100 + 7);
      ms[i] = i * 100; me[i] = i * 100 + 7;
    end
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      we       = ($urandom_range(1) == 1);
      wr_addr  = 5'($urandom);
      wr_start = 15'($urandom);
      wr_end   = 15'($urandom);
      rd_addr  = 5'($urandom);
      #1;
      checks++;
      if (int'(rd_start) != ms[rd_addr] || int'(rd_end) != me[rd_addr]) begin
        failures++;
        $display("FAIL read %0d", rd_addr);
      end
      @(posedge clk);
      if (we) begin ms[wr_addr] = int'(wr_start); me[wr_addr] = int'(wr_end); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
