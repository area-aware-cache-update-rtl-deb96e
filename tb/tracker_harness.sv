// tracker_harness: drives one greedy_update_tracker and checks it against
// interval_model_pkg::IntervalModel.
//
// MODE 0..2 replay the three worked examples of the Greedy algorithm
// (k = 2 interval merging over time; k = 3 extension by Local Gap; k = 3
// merge around the smallest Global Gap) and compare the table with the
// intervals printed for them. MODE 3 sends random line numbers, one at a
// time, and checks the table contents, the interval count and the exact
// cycle count of every request (never above 2K+1), then dumps. MODE 4
// streams random, locally clustered lines with random gaps so that the
// Update Buffer fills and stalls the sender, and dumps several epochs with
// random back-pressure on the dump port. Results are reported on
// checks/failures when done rises.
module tracker_harness
  import interval_model_pkg::*;
#(
  parameter int K     = 8,
  parameter int W     = 8,
  parameter int BUF   = 4,
  parameter int MODE  = 3,
  parameter int N_UPD = 400
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_drop,
  output int   n_extend,
  output int   n_insert,
  output int   n_merge,
  output int   n_moves
);
  logic         rst_n = 1'b0;
  logic         upd_valid = 1'b0;
  logic [W-1:0] upd_line = '0;
  logic         upd_ready, dump_req = 1'b0, dump_valid, dump_ready = 1'b0, dump_done;
  logic [W-1:0] dump_line;
  logic         busy, idle;
  logic [$clog2(K+1)-1:0] n_int;

  greedy_update_tracker #(.LINE_W(W), .K(K), .BUF_DEPTH(BUF)) dut (
    .clk, .rst_n, .upd_valid, .upd_line, .upd_ready,
    .dump_req, .dump_valid, .dump_line, .dump_ready, .dump_done,
    .busy, .idle, .n_intervals(n_int)
  );

  IntervalModel m;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [mode %0d] %s", MODE, what);
    end
  endtask

  task automatic tally(input action_e a);
    case (a)
      A_DROP:   n_drop++;
      A_EXTEND: n_extend++;
      A_INSERT: n_insert++;
      A_MERGE:  n_merge++;
      default: ;
    endcase
    n_moves += m.moves;
  endtask

  // Compare the table held in the DUT with the model.
  task automatic check_table();
    bit ok = (int'(n_int) == m.count());
    for (int i = 0; i < m.count() && ok; i++) begin
      ok = (int'(dut.u_table.mem[i][2*W-1:W]) == m.s[i]) &&
           (int'(dut.u_table.mem[i][W-1:0])   == m.e[i]);
    end
    check(ok, $sformatf("table differs from model (count %0d vs %0d)", n_int, m.count()));
  endtask

  // Compare with intervals given as a flat list {s0,e0,s1,e1,...}.
  task automatic check_paper(input int exp[$], input string what);
    bit ok = (int'(n_int) == exp.size() / 2);
    for (int i = 0; i < exp.size() / 2 && ok; i++) begin
      ok = (int'(dut.u_table.mem[i][2*W-1:W]) == exp[2*i]) &&
           (int'(dut.u_table.mem[i][W-1:0])   == exp[2*i+1]);
    end
    check(ok, what);
  endtask

  // One request into an idle tracker; measure its processing cycles.
  task automatic send_one(input int line);
    int cyc, exp_cyc;
    action_e a;
    @(negedge clk);
    upd_valid = 1'b1;
    upd_line  = W'(line);
    while (!upd_ready) @(negedge clk);
    @(negedge clk);
    upd_valid = 1'b0;
    cyc = 0;
    while (!idle) begin
      cyc++;
      @(negedge clk);
    end
    a = m.update(line, exp_cyc);
    tally(a);
    check(cyc == exp_cyc, $sformatf("line %0d (%s): %0d cycles, expected %0d",
                                    line, a.name(), cyc, exp_cyc));
    check(cyc <= 2 * K + 1, $sformatf("line %0d took %0d > 2k+1 cycles", line, cyc));
    check_table();
  endtask

  // Dump and compare the streamed lines with the model's intervals.
  task automatic dump_and_check(input int ready_pct, input int updated[$]);
    int got[$], want[$], guard;
    bit covered;
    @(negedge clk);
    dump_req = 1'b1;
    @(negedge clk);
    dump_req = 1'b0;
    guard = 0;
    while (!dump_done && guard < 200000) begin
      dump_ready = ($urandom_range(99) < ready_pct);
      #1;
      if (dump_valid && dump_ready) got.push_back(int'(dump_line));
      @(negedge clk);
      guard++;
    end
    dump_ready = 1'b0;
    m.expand(want);
    check(got == want, $sformatf("dump: %0d lines, model %0d", got.size(), want.size()));
    foreach (updated[i]) begin
      covered = 0;
      foreach (got[j]) if (got[j] == updated[i]) covered = 1;
      if (!covered) begin
        check(0, $sformatf("updated line %0d not dumped", updated[i]));
        break;
      end
    end
    check(updated.size() == 0 || got.size() >= 1, "dump produced lines");
    m.clear();
    @(negedge clk);
    check(n_int == 0, "table empty after dump");
  endtask

  int upd_list[$];

  initial begin
    int accepted[$];
    int cl, dummy;
    action_e a;
    done = 0; checks = 0; failures = 0;
    n_stall = 0; n_drop = 0; n_extend = 0; n_insert = 0; n_merge = 0; n_moves = 0;
    m = new(K);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    case (MODE)
      0: begin  // k = 2: lines 0, 1, 15, then 7, 11, 13
        send_one(0); send_one(1); send_one(15);
        check_paper('{0, 1, 15, 15}, "t1: <0,1> <15,15>");
        send_one(7);  check_paper('{0, 7, 15, 15},  "t2: <0,7> <15,15>");
        send_one(11); check_paper('{0, 11, 15, 15}, "t3: <0,11> <15,15>");
        send_one(13); check_paper('{0, 13, 15, 15}, "t4: <0,13> <15,15>");
        upd_list = '{0, 1, 15, 7, 11, 13};
        dump_and_check(100, upd_list);
      end
      1: begin  // k = 3: <0,3> <9,10> <14,15>, then line 7
        upd_list = '{0, 1, 2, 3, 9, 10, 14, 15, 7};
        foreach (upd_list[i]) send_one(upd_list[i]);
        check_paper('{0, 3, 7, 10, 14, 15}, "line 7 extends <9,10> to <7,10>");
        dump_and_check(100, upd_list);
      end
      2: begin  // k = 3: <0,2> <5,6> <10,10>, then line 14
        upd_list = '{0, 1, 2, 5, 6, 10};
        foreach (upd_list[i]) send_one(upd_list[i]);
        check_paper('{0, 2, 5, 6, 10, 10}, "before: <0,2> <5,6> <10,10>");
        send_one(14);
        upd_list.push_back(14);
        check_paper('{0, 6, 10, 10, 14, 14}, "line 14: merge, then <14,14>");
        dump_and_check(100, upd_list);
      end
      3: begin  // random single requests, exact cycle counts
        for (int ep = 0; ep < 3; ep++) begin
          upd_list.delete();
          for (int i = 0; i < N_UPD; i++) begin
            cl = $urandom_range((1 << W) - 1);
            upd_list.push_back(cl);
            send_one(cl);
          end
          dump_and_check(70, upd_list);
        end
      end
      default: begin  // streaming with stalls
        for (int ep = 0; ep < 3; ep++) begin
          upd_list.delete();
          cl = $urandom_range((1 << W) - 1);
          for (int i = 0; i < N_UPD; i++) begin
            if ($urandom_range(3) == 0) cl = $urandom_range((1 << W) - 1);
            else cl = (cl + $urandom_range(2)) % (1 << W);
            @(negedge clk);
            upd_valid = 1'b1;
            upd_line  = W'(cl);
            #1;
            while (!upd_ready) begin
              n_stall++;
              @(negedge clk);
            end
            @(posedge clk);
            upd_list.push_back(cl);
            a = m.update(cl, dummy);
            tally(a);
            @(negedge clk);
            upd_valid = 1'b0;
            repeat ($urandom_range(2)) @(negedge clk);
          end
          while (!idle) @(negedge clk);
          check_table();
          dump_and_check(60, upd_list);
        end
      end
    endcase
    done = 1;
  end

endmodule
