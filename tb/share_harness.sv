// share_harness: random test of one vertical_share_port configuration.
//
// Caches issue random requests and hold each until accepted; the tracker
// side accepts at random. Every accepted request must carry the vertical
// mapping of the granted cache's line, exactly one cache is granted, and no
// cache waits for more than C grants to others. On the dump side random
// shared lines are fed in; each must come out as its C cache lines, in
// order, on the owning cache's port only.
module share_harness #(
  parameter int C = 2,
  parameter int W = 12,
  parameter int N = 2000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   conflicts
);
  localparam int CB = $clog2(C);
  logic rst_n = 1'b0;
  logic [C-1:0] c_upd_valid = '0, c_upd_ready, c_dump_valid, c_dump_ready = '0;
  logic [C-1:0][W-1:0] c_upd_line = '0, c_dump_line;
  logic t_upd_valid, t_upd_ready = 1'b0, t_dump_valid = 1'b0, t_dump_ready, dump_busy;
  logic [W-1:0] t_upd_line, t_dump_line = '0;

  vertical_share_port #(.C(C), .LINE_W(W)) dut (.*);

  function automatic int vmap(int cache, int line);
    return (cache << (W - CB)) | (line >> CB);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [C=%0d] %s", C, what); end
  endtask

  int wait_n[C];

  initial begin
    int g, ng, exp_q[$], got[$];
    done = 0; checks = 0; failures = 0; conflicts = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Update side.
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      for (int c = 0; c < C; c++)
        if (!c_upd_valid[c] && $urandom_range(2) != 0) begin
          c_upd_valid[c] = 1'b1;
          c_upd_line[c]  = W'($urandom);
        end
      t_upd_ready = ($urandom_range(3) != 0);
      #1;
      if ($countones(c_upd_valid) > 1) conflicts++;
      check(t_upd_valid == (c_upd_valid != '0), "t_upd_valid");
      ng = $countones(c_upd_ready);
      check(ng == ((t_upd_valid && t_upd_ready) ? 1 : 0), "one grant per accepted cycle");
      if (ng == 1) begin
        g = 0;
        for (int c = 0; c < C; c++) if (c_upd_ready[c]) g = c;
        check(c_upd_valid[g], "grant goes to a requesting cache");
        check(int'(t_upd_line) == vmap(g, int'(c_upd_line[g])), "vertical mapping");
        for (int c = 0; c < C; c++) begin
          if (c == g) wait_n[c] = 0;
          else if (c_upd_valid[c]) wait_n[c]++;
          check(wait_n[c] < C, "no cache waits C grants");
        end
      end
      @(posedge clk);
      #1;
      if (ng == 1) c_upd_valid[g] = 1'b0;
    end
    c_upd_valid = '0;
    // Dump side.
    for (int t = 0; t < N / 4; t++) begin
      automatic int sl = $urandom_range((1 << W) - 1);
      automatic int own = sl >> (W - CB);
      exp_q.delete(); got.delete();
      for (int s = 0; s < C; s++) exp_q.push_back(((sl & ((1 << (W - CB)) - 1)) << CB) | s);
      @(negedge clk);
      t_dump_valid = 1'b1;
      t_dump_line  = W'(sl);
      #1;
      check(t_dump_ready, "dump port free");
      @(negedge clk);
      t_dump_valid = 1'b0;
      for (int cyc = 0; cyc < 20 * C && got.size() < C; cyc++) begin
        c_dump_ready = C'($urandom);
        #1;
        for (int c = 0; c < C; c++)
          if (c_dump_valid[c]) begin
            check(c == own, "dump only on owning cache");
            if (c_dump_ready[c]) got.push_back(int'(c_dump_line[c]));
          end
        @(negedge clk);
      end
      check(got == exp_q, $sformatf("shared line %0d expands to its %0d lines", sl, C));
    end
    c_dump_ready = '0;
    done = 1;
  end
endmodule
