// distributed_tracker: Update Trackers for a distributed L2.
//
// N_CACHES physically distributed L2 slices are tracked by N_CACHES / C
// Greedy trackers; each tracker is shared by C adjacent caches through a
// vertical_share_port (cache n belongs to tracker n / C, slot n % C).
// Defaults: 16 caches of 4096 lines (256 kB, 64 B per line), C = 2, so
// eight trackers of K = 4 intervals (32 intervals in all) with four-entry
// Update Buffers each.
//
// A dump_req pulse starts a dump in every tracker at once; each cache
// receives the numbers of its own lines to transfer on its dump port.
// dump_done pulses once every tracker has finished and every sharing port
// has sent the last of its cache lines. Issuing the dump to
// all trackers together and combining their completions is this design's
// choice.
module distributed_tracker #(
  parameter int unsigned N_CACHES  = 16,
  parameter int unsigned C         = 2,
  parameter int unsigned LINE_W    = 12,
  parameter int unsigned K         = 4,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned NT       = N_CACHES / C
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [N_CACHES-1:0]             upd_valid,
  input  logic [N_CACHES-1:0][LINE_W-1:0] upd_line,
  output logic [N_CACHES-1:0]             upd_ready,
  input  logic                            dump_req,
  output logic [N_CACHES-1:0]             dump_valid,
  output logic [N_CACHES-1:0][LINE_W-1:0] dump_line,
  input  logic [N_CACHES-1:0]             dump_ready,
  output logic                            dump_done
);
  logic [NT-1:0] t_done, done_seen, exp_busy;

  for (genvar t = 0; t < int'(NT); t++) begin : g_trk
    logic              tu_valid, tu_ready, td_valid, td_ready;
    logic [LINE_W-1:0] tu_line, td_line;
    logic              t_busy, t_idle;
    logic [$clog2(K+1)-1:0] t_cnt;

    vertical_share_port #(.C(C), .LINE_W(LINE_W)) u_share (
      .clk, .rst_n,
      .c_upd_valid (upd_valid [t*C +: C]),
      .c_upd_line  (upd_line  [t*C +: C]),
      .c_upd_ready (upd_ready [t*C +: C]),
      .t_upd_valid (tu_valid), .t_upd_line(tu_line), .t_upd_ready(tu_ready),
      .t_dump_valid(td_valid), .t_dump_line(td_line), .t_dump_ready(td_ready),
      .c_dump_valid(dump_valid[t*C +: C]),
      .c_dump_line (dump_line [t*C +: C]),
      .c_dump_ready(dump_ready[t*C +: C]),
      .dump_busy   (exp_busy[t])
    );

    greedy_update_tracker #(.LINE_W(LINE_W), .K(K), .BUF_DEPTH(BUF_DEPTH)) u_trk (
      .clk, .rst_n,
      .upd_valid(tu_valid), .upd_line(tu_line), .upd_ready(tu_ready),
      .dump_req,
      .dump_valid(td_valid), .dump_line(td_line), .dump_ready(td_ready),
      .dump_done(t_done[t]),
      .busy(t_busy), .idle(t_idle), .n_intervals(t_cnt)
    );
  end

  // Completion: remember which trackers have finished the current dump.
  logic dumping;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dumping   <= 1'b0;
      done_seen <= '0;
      dump_done <= 1'b0;
    end else begin
      dump_done <= 1'b0;
      if (dump_req) begin
        dumping   <= 1'b1;
        done_seen <= '0;
      end else if (dumping) begin
        if (&(done_seen | t_done) && (exp_busy == '0)) begin
          dumping   <= 1'b0;
          dump_done <= 1'b1;
        end
        done_seen <= done_seen | t_done;
      end
    end
  end

endmodule
