// update_tracker_top: cache Update Trackers for postsilicon state dumps.
//
// Two configurations of the same design-for-debug feature, side by side:
//   * s_*: the tracker of a 4 MB shared L2 (32768 lines, 15-bit line
//     numbers): one Greedy Interval Table of K = 32 intervals behind a
//     four-entry Update Buffer.
//   * d_*: the trackers of a distributed L2 of 16 caches of 4096 lines:
//     eight Greedy trackers of K = 4, each shared vertically by two
//     adjacent caches.
// Each cache side reports written line numbers (valid/ready; ready low is
// Busy and stalls the writer), raises a dump_req pulse at a state dump,
// and then receives the numbers of the lines to transfer off-chip on its
// dump port, followed by a dump_done pulse. The caches, the processor and
// the on-chip network that would carry these signals lie outside this
// design.
// S_METHOD selects the tracker of the shared L2: 0 (default) is the Greedy
// Interval Table; 1 is the plain bit-vector with S_T lines per bit
// (tlines_bitvector), for comparison. With the bit-vector, s_n_intervals
// reads zero.
module update_tracker_top
  import ut_pkg::*;
#(
  parameter int unsigned S_LINE_W  = SHARED_LINE_W,
  parameter int unsigned S_K       = SHARED_K,
  parameter int unsigned S_METHOD  = 0,
  parameter int unsigned S_T       = 2,
  parameter int unsigned BUF_D     = BUF_DEPTH,
  parameter int unsigned D_CACHES  = DIST_CACHES,
  parameter int unsigned D_C       = DIST_C,
  parameter int unsigned D_LINE_W  = DIST_LINE_W,
  parameter int unsigned D_K       = DIST_K
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // shared L2
  input  logic                              s_upd_valid,
  input  logic [S_LINE_W-1:0]               s_upd_line,
  output logic                              s_upd_ready,
  input  logic                              s_dump_req,
  output logic                              s_dump_valid,
  output logic [S_LINE_W-1:0]               s_dump_line,
  input  logic                              s_dump_ready,
  output logic                              s_dump_done,
  output logic [$clog2(S_K+1)-1:0]          s_n_intervals,
  // distributed L2
  input  logic [D_CACHES-1:0]               d_upd_valid,
  input  logic [D_CACHES-1:0][D_LINE_W-1:0] d_upd_line,
  output logic [D_CACHES-1:0]               d_upd_ready,
  input  logic                              d_dump_req,
  output logic [D_CACHES-1:0]               d_dump_valid,
  output logic [D_CACHES-1:0][D_LINE_W-1:0] d_dump_line,
  input  logic [D_CACHES-1:0]               d_dump_ready,
  output logic                              d_dump_done
);
  if (S_METHOD == 0) begin : g_greedy
    logic s_busy, s_idle;
    greedy_update_tracker #(.LINE_W(S_LINE_W), .K(S_K), .BUF_DEPTH(BUF_D)) u_shared (
      .clk, .rst_n,
      .upd_valid(s_upd_valid), .upd_line(s_upd_line), .upd_ready(s_upd_ready),
      .dump_req(s_dump_req),
      .dump_valid(s_dump_valid), .dump_line(s_dump_line), .dump_ready(s_dump_ready),
      .dump_done(s_dump_done),
      .busy(s_busy), .idle(s_idle), .n_intervals(s_n_intervals)
    );
  end else begin : g_bitvec
    logic s_busy;
    tlines_bitvector #(.LINE_W(S_LINE_W), .T(S_T)) u_shared (
      .clk, .rst_n,
      .upd_valid(s_upd_valid), .upd_line(s_upd_line), .upd_ready(s_upd_ready),
      .dump_req(s_dump_req),
      .dump_valid(s_dump_valid), .dump_line(s_dump_line), .dump_ready(s_dump_ready),
      .dump_done(s_dump_done), .busy(s_busy)
    );
    assign s_n_intervals = '0;
  end

  distributed_tracker #(
    .N_CACHES(D_CACHES), .C(D_C), .LINE_W(D_LINE_W), .K(D_K), .BUF_DEPTH(BUF_D)
  ) u_dist (
    .clk, .rst_n,
    .upd_valid(d_upd_valid), .upd_line(d_upd_line), .upd_ready(d_upd_ready),
    .dump_req(d_dump_req),
    .dump_valid(d_dump_valid), .dump_line(d_dump_line), .dump_ready(d_dump_ready),
    .dump_done(d_dump_done)
  );

endmodule
