// tb_vertical_share_port: self-checking test of vertical_share_port.
// Directed: the vertical-sharing example with two 16-line caches (line 14
// and 15 of cache A -> shared line 7, lines 0 and 1 of cache B -> shared
// line 8, and back). Random: C = 2 with 12-bit lines and C = 4 with 12-bit
// lines through share_harness.
module tb_vertical_share_port;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // Directed instance: C = 2, 16 lines per cache.
  logic rst_n = 1'b0;
  logic [1:0] cv = '0, cr, dv, dr = 2'b11;
  logic [1:0][3:0] cl = '0, dl;
  logic tv, tr = 1'b1, tdv = 1'b0, tdr;
  logic [3:0] tl, tdl = '0;
  logic dbusy;
  vertical_share_port #(.C(2), .LINE_W(4)) dut (.clk, .rst_n,
    .c_upd_valid(cv), .c_upd_line(cl), .c_upd_ready(cr),
    .t_upd_valid(tv), .t_upd_line(tl), .t_upd_ready(tr),
    .t_dump_valid(tdv), .t_dump_line(tdl), .t_dump_ready(tdr),
    .c_dump_valid(dv), .c_dump_line(dl), .c_dump_ready(dr), .dump_busy(dbusy));

  logic [1:0] hd;
  int hc [2], hf [2], hx [2];
  share_harness #(.C(2), .W(12)) h2 (.clk, .done(hd[0]), .checks(hc[0]), .failures(hf[0]), .conflicts(hx[0]));
  share_harness #(.C(4), .W(12)) h4 (.clk, .done(hd[1]), .checks(hc[1]), .failures(hf[1]), .conflicts(hx[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic map_one(input int cache, input int line, input int shared);
    @(negedge clk);
    cv = '0; cv[cache] = 1'b1; cl[cache] = 4'(line);
    #1;
    check(tv && int'(tl) == shared, $sformatf("cache %0d line %0d -> %0d (got %0d)", cache, line, shared, tl));
  endtask

  task automatic unmap_one(input int shared, input int cache, input int l0);
    int got[$];
    @(negedge clk);
    tdv = 1'b1; tdl = 4'(shared);
    @(negedge clk);
    tdv = 1'b0;
    repeat (2) begin
      #1;
      if (dv[cache]) got.push_back(int'(dl[cache]));
      check(dv[1-cache] == 1'b0, "other cache idle");
      @(negedge clk);
    end
    check(got.size() == 2 && got[0] == l0 && got[1] == l0 + 1,
          $sformatf("shared %0d -> cache %0d lines %0d,%0d", shared, cache, l0, l0 + 1));
  endtask

  initial begin
    int cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    map_one(0, 14, 7); map_one(0, 15, 7); map_one(0, 0, 0); map_one(0, 1, 0);
    map_one(1, 0, 8);  map_one(1, 1, 8);  map_one(1, 14, 15); map_one(1, 6, 11);
    @(negedge clk);
    cv = '0;
    unmap_one(7, 0, 14); unmap_one(8, 1, 0); unmap_one(15, 1, 14);
    while (hd != '1 && cyc < 100000) begin @(posedge clk); cyc++; end
    checks++;
    if (hd != '1) begin failures++; $display("FAIL watchdog"); end
    for (int i = 0; i < 2; i++) begin
      checks += hc[i]; failures += hf[i];
      checks++;
      if (hx[i] == 0) begin failures++; $display("FAIL no arbitration conflict seen"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
