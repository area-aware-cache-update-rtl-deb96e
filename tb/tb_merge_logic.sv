// tb_merge_logic: self-checking test of merge_logic (W = 15).
// Checks every write operation, including the two-cycle merge of the
// worked example <0,2> + <5,6> -> <0,6>, and random operands.
module tb_merge_logic;
  import ut_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, hold_en = 1'b0;
  wr_op_e op = WR_MOVE;
  logic [14:0] line = '0, rd_start = '0, rd_end = '0, wr_start, wr_end;
  int checks = 0, failures = 0;

  merge_logic #(.W(15)) dut (.*);

  task automatic expect_wr(input int s, input int e, input string what);
    #1;
    checks++;
    if (int'(wr_start) != s || int'(wr_end) != e) begin
      failures++;
      $display("FAIL %s: <%0d,%0d> want <%0d,%0d>", what, wr_start, wr_end, s, e);
    end
  endtask

  initial begin
    int a, b, l, held;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    op = WR_MOVE; hold_en = 1'b1; rd_start = 0; rd_end = 2;
    @(negedge clk);
    hold_en = 1'b0; op = WR_MERGE; rd_start = 5; rd_end = 6;
    expect_wr(0, 6, "example merge");
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      a = $urandom_range(32767); b = $urandom_range(32767); l = $urandom_range(32767);
      rd_start = 15'(a); rd_end = 15'(b); line = 15'(l);
      hold_en = 1'b1; op = WR_NEW;      expect_wr(l, l, "new");
      op = WR_EXT_START;                expect_wr(l, b, "extend start");
      op = WR_EXT_END;                  expect_wr(a, l, "extend end");
      op = WR_MOVE;                     expect_wr(a, b, "move");
      held = a;
      @(negedge clk);
      hold_en = 1'b0;
      rd_start = 15'($urandom); rd_end = 15'(b);
      op = WR_MERGE;                    expect_wr(held, b, "merge");
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
