// vertical_share_port: lets C caches share one Update Tracker by vertical
// sharing.
//
// Each group of C adjacent lines of a cache is folded into one line of the
// tracker, and the caches occupy consecutive ranges of the tracker's line
// numbers: line l of cache i becomes shared line i * (LINES / C) + l / C
// (with C = 2, lines 14 and 15 of cache 0 map to shared line 7 and lines
// 0 and 1 of cache 1 to shared line 8). The tracker therefore sees the
// same number of line numbers as a single cache, and a cache that writes
// nothing dumps nothing.
//
// Update side: a round-robin arbiter passes one cache request per cycle to
// the tracker (valid/ready); a cache that is not granted waits, and a
// granted request that the tracker refuses keeps the grant until taken.
// Dump side: every shared line taken from the tracker is expanded back
// into its C cache lines, offered one per cycle on the owning cache's dump
// port. The arbitration and the expansion order are this design's choice.
module vertical_share_port #(
  parameter int unsigned C      = 2,
  parameter int unsigned LINE_W = 12,
  localparam int unsigned CB    = (C > 1) ? $clog2(C) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // caches -> tracker
  input  logic [C-1:0]               c_upd_valid,
  input  logic [C-1:0][LINE_W-1:0]   c_upd_line,
  output logic [C-1:0]               c_upd_ready,
  output logic                       t_upd_valid,
  output logic [LINE_W-1:0]          t_upd_line,
  input  logic                       t_upd_ready,
  // tracker -> caches
  input  logic                       t_dump_valid,
  input  logic [LINE_W-1:0]          t_dump_line,
  output logic                       t_dump_ready,
  output logic [C-1:0]               c_dump_valid,
  output logic [C-1:0][LINE_W-1:0]   c_dump_line,
  input  logic [C-1:0]               c_dump_ready,
  output logic                       dump_busy     // still expanding a line
);
  logic [CB-1:0] rr, grant, held;
  logic          any, locked;

  // Round-robin choice starting at rr. A request refused by the tracker
  // keeps its grant until it is accepted, so the tracker side sees a held
  // request, as its handshake requires.
  always_comb begin
    grant = rr;
    any   = 1'b0;
    if (locked) begin
      grant = held;
      any   = 1'b1;
    end else begin
      for (int n = 0; n < int'(C); n++) begin
        if (!any && c_upd_valid[CB'((int'(rr) + n) % int'(C))]) begin
          grant = CB'((int'(rr) + n) % int'(C));
          any   = 1'b1;
        end
      end
    end
  end

  assign t_upd_valid = any;
  assign t_upd_line  = {grant, c_upd_line[grant][LINE_W-1:CB]};

  always_comb begin
    c_upd_ready = '0;
    c_upd_ready[grant] = any && t_upd_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr     <= '0;
      held   <= '0;
      locked <= 1'b0;
    end else begin
      locked <= any && !t_upd_ready;
      held   <= grant;
      if (any && t_upd_ready) rr <= (grant == CB'(C-1)) ? '0 : grant + 1'b1;
    end
  end

  // Dump expansion.
  logic              hold;
  logic [LINE_W-1:0] sh_line;
  logic [CB-1:0]     sub, own;

  assign own          = sh_line[LINE_W-1 -: CB];
  assign t_dump_ready = !hold;
  assign dump_busy    = hold;

  always_comb begin
    c_dump_valid = '0;
    c_dump_line  = '0;
    c_dump_valid[own] = hold;
    c_dump_line[own]  = {sh_line[LINE_W-CB-1:0], sub};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold    <= 1'b0;
      sh_line <= '0;
      sub     <= '0;
    end else if (!hold) begin
      if (t_dump_valid) begin
        hold    <= 1'b1;
        sh_line <= t_dump_line;
        sub     <= '0;
      end
    end else if (c_dump_ready[own]) begin
      if (sub == CB'(C-1)) hold <= 1'b0;
      else                 sub  <= sub + 1'b1;
    end
  end

  initial assert (C >= 2 && (C & (C - 1)) == 0)
    else $error("vertical_share_port: C must be a power of two >= 2");

endmodule
