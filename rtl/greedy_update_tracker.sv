// greedy_update_tracker: Greedy Interval Table Update Tracker for one cache.
//
// Records which lines of a cache were written since the previous state
// dump, in at most K intervals <start,end> instead of one bit per line.
// The cache reports every written line number on the upd_* port; the
// Update Buffer absorbs requests that arrive while the controller is busy
// and drops upd_ready (Busy, which stalls the processor) when it is full.
// The controller keeps the Interval Table sorted and, when it runs out of
// intervals, either widens the nearest interval or merges the two closest
// intervals, whichever takes in fewer non-updated lines. A dump_req pulse
// drains the buffer, streams every tracked line number to the cache on the
// dump_* port (the cache sends those lines off-chip), pulses dump_done and
// starts a new, empty epoch. Intervals may include lines that were not
// written (the dumping overhead) but never miss one that was.
//
// Structure: update_buffer -> greedy_controller, which drives the read
// port of interval_table into check_interval, min_local_gap,
// min_global_gap, merge_logic and dumping_logic, and the write port from
// merge_logic. Timing: see greedy_controller (at most 2K+1 cycles per
// request) and dumping_logic (one line per cycle, one extra cycle per
// interval). rst_n is the tracker's Reset and also empties the table.
module greedy_update_tracker #(
  parameter int unsigned LINE_W    = 15,
  parameter int unsigned K         = 32,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned IW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW = $clog2(K+1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              upd_valid,
  input  logic [LINE_W-1:0] upd_line,
  output logic              upd_ready,
  input  logic              dump_req,
  output logic              dump_valid,
  output logic [LINE_W-1:0] dump_line,
  input  logic              dump_ready,
  output logic              dump_done,
  output logic              busy,
  output logic              idle,
  output logic [CW-1:0]     n_intervals
);
  logic              buf_valid, buf_pop, buf_block;
  logic [LINE_W-1:0] buf_line;
  logic [$clog2(BUF_DEPTH+1)-1:0] buf_level;

  logic [IW-1:0]     rd_addr, wr_addr, dmp_rd_idx, unit_idx, loc_idx, glob_idx;
  logic [LINE_W-1:0] rd_start, rd_end, wr_start, wr_end;
  logic [LINE_W-1:0] unit_line, loc_min, glob_min;
  logic              we, hold_en, unit_init, unit_en;
  logic              is_member, is_below, is_above, loc_ext_start;
  logic              dmp_start, dmp_done, dmp_busy;
  ut_pkg::wr_op_e    wr_op;

  update_buffer #(.W(LINE_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .block(buf_block),
    .in_valid(upd_valid), .in_line(upd_line), .in_ready(upd_ready),
    .out_valid(buf_valid), .out_line(buf_line), .out_pop(buf_pop),
    .level(buf_level)
  );

  greedy_controller #(.W(LINE_W), .K(K)) u_ctrl (
    .clk, .rst_n,
    .buf_valid, .buf_line, .buf_pop, .buf_block,
    .dump_req, .dmp_start, .dmp_done, .dmp_rd_idx, .dump_done,
    .rd_addr, .we, .wr_addr, .wr_op, .hold_en,
    .unit_line, .unit_init, .unit_en, .unit_idx,
    .is_member, .is_below, .loc_min, .loc_idx, .loc_ext_start,
    .glob_min, .glob_idx,
    .count(n_intervals), .idle
  );

  interval_table #(.K(K), .W(LINE_W)) u_table (
    .clk, .rd_addr, .rd_start, .rd_end,
    .we, .wr_addr, .wr_start, .wr_end
  );

  check_interval #(.W(LINE_W)) u_check (
    .line(unit_line), .start_a(rd_start), .end_a(rd_end),
    .member(is_member), .below(is_below), .above(is_above)
  );

  min_local_gap #(.W(LINE_W), .IW(IW)) u_local (
    .clk, .rst_n, .init(unit_init), .en(unit_en), .line(unit_line),
    .start_a(rd_start), .end_a(rd_end), .idx(unit_idx),
    .min_gap(loc_min), .min_idx(loc_idx), .min_ext_start(loc_ext_start)
  );

  min_global_gap #(.W(LINE_W), .IW(IW)) u_global (
    .clk, .rst_n, .init(unit_init), .en(unit_en),
    .start_a(rd_start), .end_a(rd_end), .idx(unit_idx),
    .min_gap(glob_min), .min_idx(glob_idx)
  );

  merge_logic #(.W(LINE_W)) u_merge (
    .clk, .rst_n, .op(wr_op), .hold_en, .line(unit_line),
    .rd_start, .rd_end, .wr_start, .wr_end
  );

  dumping_logic #(.W(LINE_W), .K(K)) u_dump (
    .clk, .rst_n, .start(dmp_start), .count(n_intervals),
    .rd_idx(dmp_rd_idx), .rd_start, .rd_end,
    .dump_valid, .dump_line, .dump_ready,
    .busy(dmp_busy), .done(dmp_done)
  );

  assign busy = !upd_ready;

endmodule
