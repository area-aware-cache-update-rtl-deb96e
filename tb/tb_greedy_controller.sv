// tb_greedy_controller: self-checking test of greedy_controller (K = 6,
// 7-bit line numbers) with the real table, gap units, merge and dumping
// logic around it and the Update Buffer replaced by a testbench queue that
// offers a new line whenever the controller pops one.
// Checks, against interval_model_pkg: the spacing of consecutive pops,
// which is the exact cycle count of each request (at most 2K+1); the table
// after every epoch; the dumped stream; and that the table is empty after
// the dump and the buffer input is blocked while a dump is pending.
module tb_greedy_controller;
  import ut_pkg::*;
  import interval_model_pkg::*;
  localparam int K = 6, W = 7, IW = 3, CW = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic          buf_valid, buf_pop, buf_block, dump_req = 1'b0;
  logic [W-1:0]  buf_line;
  logic          dmp_start, dmp_done, dump_done, we, hold_en, unit_init, unit_en;
  logic [IW-1:0] dmp_rd_idx, rd_addr, wr_addr, unit_idx, loc_idx, glob_idx;
  logic [W-1:0]  unit_line, loc_min, glob_min, rd_start, rd_end, wr_start, wr_end, dump_line;
  logic          is_member, is_below, is_above, loc_ext_start, idle, dump_valid, dmp_busy;
  logic          dump_ready = 1'b1;
  logic [CW-1:0] count;
  wr_op_e        wr_op;

  greedy_controller #(.W(W), .K(K)) dut (.*);
  interval_table #(.K(K), .W(W)) u_table (.clk, .rd_addr, .rd_start, .rd_end,
    .we, .wr_addr, .wr_start, .wr_end);
  check_interval #(.W(W)) u_check (.line(unit_line), .start_a(rd_start), .end_a(rd_end),
    .member(is_member), .below(is_below), .above(is_above));
  min_local_gap #(.W(W), .IW(IW)) u_local (.clk, .rst_n, .init(unit_init), .en(unit_en),
    .line(unit_line), .start_a(rd_start), .end_a(rd_end), .idx(unit_idx),
    .min_gap(loc_min), .min_idx(loc_idx), .min_ext_start(loc_ext_start));
  min_global_gap #(.W(W), .IW(IW)) u_global (.clk, .rst_n, .init(unit_init), .en(unit_en),
    .start_a(rd_start), .end_a(rd_end), .idx(unit_idx), .min_gap(glob_min), .min_idx(glob_idx));
  merge_logic #(.W(W)) u_merge (.clk, .rst_n, .op(wr_op), .hold_en, .line(unit_line),
    .rd_start, .rd_end, .wr_start, .wr_end);
  dumping_logic #(.W(W), .K(K)) u_dump (.clk, .rst_n, .start(dmp_start), .count,
    .rd_idx(dmp_rd_idx), .rd_start, .rd_end, .dump_valid, .dump_line, .dump_ready,
    .busy(dmp_busy), .done(dmp_done));

  int src[$];
  int head = 0;   // advanced with a nonblocking assignment at each pop
  assign buf_valid = (head < src.size());
  assign buf_line  = buf_valid ? W'(src[head]) : '0;

  int checks = 0, failures = 0, n_merge = 0, n_blocked = 0;
  int pop_times[$];
  longint cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && buf_pop && buf_valid) begin
      pop_times.push_back(int'(cyc));
      head <= head + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    IntervalModel m = new(K);
    int lines[$], exp_cyc[$], got[$], want[$], c;
    action_e a;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int ep = 0; ep < 4; ep++) begin
      lines.delete(); exp_cyc.delete(); pop_times.delete();
      for (int i = 0; i < 200; i++) begin
        lines.push_back($urandom_range((1 << W) - 1));
        a = m.update(lines[i], c);
        exp_cyc.push_back(c);
        if (a == A_MERGE) n_merge++;
      end
      @(negedge clk);
      src.delete();
      head = 0;
      foreach (lines[i]) src.push_back(lines[i]);
      @(negedge clk);
      while (!(idle && head == src.size())) @(negedge clk);
      check(pop_times.size() == lines.size(), "every line popped");
      for (int i = 0; i + 1 < pop_times.size(); i++) begin
        check(pop_times[i+1] - pop_times[i] == exp_cyc[i],
              $sformatf("request %0d: %0d cycles, expected %0d", i,
                        pop_times[i+1] - pop_times[i], exp_cyc[i]));
        check(exp_cyc[i] <= 2 * K + 1, "model within 2k+1");
      end
      check(int'(count) == m.count(), "count");
      for (int i = 0; i < m.count(); i++)
        check(int'(u_table.mem[i][2*W-1:W]) == m.s[i] && int'(u_table.mem[i][W-1:0]) == m.e[i],
              $sformatf("entry %0d", i));
      // Dump.
      got.delete();
      dump_req = 1'b1;
      @(negedge clk);
      dump_req = 1'b0;
      if (buf_block) n_blocked++;
      while (!dump_done) begin
        if (dump_valid) got.push_back(int'(dump_line));
        @(negedge clk);
      end
      m.expand(want);
      check(got == want, $sformatf("dump stream (%0d vs %0d lines)", got.size(), want.size()));
      check(count == 0 && !buf_block, "table empty and buffer open after dump");
      m.clear();
    end
    check(n_merge > 0 && n_blocked > 0, "merges and dump blocking exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
