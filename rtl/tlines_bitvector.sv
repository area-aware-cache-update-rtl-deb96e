// tlines_bitvector: t-lines/bit bit-vector Update Tracker.
//
// The simpler of the two tracking methods: one bit stands for T adjacent
// cache lines and is set when any of them is written, so the storage is
// the number of lines divided by T. Every line of a group whose bit is set
// is dumped. The vector is kept in a memory of WORD-bit words: an update
// is a one-cycle read-modify-write of one word, so the tracker accepts a
// request every cycle (upd_ready is low only while the vector is being
// cleared after reset or while a dump runs).
//
// Dump: a dump_req pulse blocks updates; the words are read in order and
// cleared as they are read; an all-zero word costs one cycle, and for each
// set bit its T line numbers are offered on dump_valid/dump_ready, one per
// accepted transfer, in ascending order. dump_done pulses at the end.
// After reset the words are cleared one per cycle (NBITS / WORD cycles).
// The word organisation, the clearing sequence and the dump order are
// this design's choices; the published method gives only the bit mapping.
module tlines_bitvector #(
  parameter int unsigned LINE_W = 15,
  parameter int unsigned T      = 2,
  parameter int unsigned WORD   = 32,
  localparam int unsigned TB    = $clog2(T),
  localparam int unsigned NBITS = (1 << LINE_W) / T,
  localparam int unsigned WW    = (WORD < NBITS) ? WORD : NBITS,
  localparam int unsigned NW    = NBITS / WW,
  localparam int unsigned WB    = (WW > 1) ? $clog2(WW) : 1,
  localparam int unsigned AB    = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned SB    = (T > 1) ? TB : 1
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
  output logic              busy
);
  typedef enum logic [2:0] {B_CLEAR, B_RUN, B_LOAD, B_SCAN, B_DONE} bstate_e;
  bstate_e       st;
  logic [WW-1:0] mem [NW];
  logic [AB-1:0] widx;
  logic [WB-1:0] bpos;
  logic [SB-1:0] sub;
  logic [WW-1:0] word_q;
  logic          pend;

  logic [LINE_W-1:0] grp;       // bit index of the updated line
  logic [AB-1:0]     u_word;
  logic [WB-1:0]     u_bit;
  logic              upd_fire, last_word, last_bit, last_sub;

  assign grp       = upd_line >> TB;
  assign u_word    = AB'(grp >> $clog2(WW));
  assign u_bit     = WB'(grp);
  assign upd_ready = (st == B_RUN) && !pend;
  assign upd_fire  = upd_valid && upd_ready;
  assign busy      = !upd_ready;
  assign last_word = (widx == AB'(NW - 1));
  assign last_bit  = (bpos == WB'(WW - 1));
  assign last_sub  = (sub == SB'(T - 1));

  assign dump_valid = (st == B_SCAN) && word_q[bpos];
  assign dump_line  = LINE_W'(((LINE_W'(widx) * LINE_W'(WW) + LINE_W'(bpos)) << TB) | LINE_W'(sub));
  assign dump_done  = (st == B_DONE);

  always_ff @(posedge clk) begin
    if (st == B_CLEAR || st == B_LOAD) mem[widx] <= '0;
    else if (upd_fire)                 mem[u_word] <= mem[u_word] | (WW'(1) << u_bit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= B_CLEAR;
      widx   <= '0;
      bpos   <= '0;
      sub    <= '0;
      word_q <= '0;
      pend   <= 1'b0;
    end else begin
      if (dump_req) pend <= 1'b1;
      unique case (st)
        B_CLEAR: begin
          widx <= last_word ? '0 : widx + 1'b1;
          if (last_word) st <= B_RUN;
        end
        B_RUN: if (pend) begin
          widx <= '0;
          st   <= B_LOAD;
        end
        B_LOAD: begin
          word_q <= mem[widx];
          bpos   <= '0;
          sub    <= '0;
          if (mem[widx] != '0)  st <= B_SCAN;
          else if (last_word)   st <= B_DONE;
          else                  widx <= widx + 1'b1;
        end
        B_SCAN: begin
          if (!word_q[bpos] || (dump_ready && last_sub)) begin
            sub <= '0;
            if (last_bit) begin
              if (last_word) st <= B_DONE;
              else begin
                widx <= widx + 1'b1;
                st   <= B_LOAD;
              end
            end else bpos <= bpos + 1'b1;
          end else if (dump_ready) sub <= sub + 1'b1;
        end
        default: begin  // B_DONE, one cycle
          pend <= 1'b0;
          widx <= '0;
          st   <= B_RUN;
        end
      endcase
    end
  end

  initial assert (T >= 1 && (T & (T - 1)) == 0)
    else $error("tlines_bitvector: T must be a power of two");

endmodule
