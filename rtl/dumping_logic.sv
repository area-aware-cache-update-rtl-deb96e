// dumping_logic: sends the tracked lines to the cache at a dump.
//
// On start it walks the Interval Table from slot 0 to count-1. For each
// interval it spends one cycle reading <start,end> from the read port and
// then offers every line number from start to end, one per accepted
// transfer (dump_valid/dump_ready), to the cache, which moves that line's
// contents off-chip. After the last line of the last interval it pulses
// done. With an empty table done follows start by one cycle.
// Throughput: one line per cycle while dump_ready is high, plus one cycle
// per interval. The published design names this unit only; its sequencing and
// handshake are this design's choice.
module dumping_logic #(
  parameter int unsigned W  = 15,
  parameter int unsigned K  = 32,
  parameter int unsigned IW = (K > 1) ? $clog2(K) : 1,
  parameter int unsigned CW = $clog2(K+1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] count,
  output logic [IW-1:0] rd_idx,
  input  logic [W-1:0]  rd_start,
  input  logic [W-1:0]  rd_end,
  output logic          dump_valid,
  output logic [W-1:0]  dump_line,
  input  logic          dump_ready,
  output logic          busy,
  output logic          done
);
  typedef enum logic [1:0] {D_IDLE, D_LOAD, D_EMIT, D_DONE} dstate_e;
  dstate_e      st;
  logic [CW-1:0] idx, last;
  logic [W-1:0]  cur, stop;

  assign rd_idx     = IW'(idx);
  assign dump_valid = (st == D_EMIT);
  assign dump_line  = cur;
  assign busy       = (st != D_IDLE);
  assign done       = (st == D_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= D_IDLE;
      idx  <= '0;
      last <= '0;
      cur  <= '0;
      stop <= '0;
    end else begin
      unique case (st)
        D_IDLE: if (start) begin
          idx  <= '0;
          last <= count - 1'b1;
          st   <= (count == '0) ? D_DONE : D_LOAD;
        end
        D_LOAD: begin
          cur  <= rd_start;
          stop <= rd_end;
          st   <= D_EMIT;
        end
        D_EMIT: if (dump_ready) begin
          if (cur != stop) begin
            cur <= cur + 1'b1;
          end else if (idx == last) begin
            st <= D_DONE;
          end else begin
            idx <= idx + 1'b1;
            st  <= D_LOAD;
          end
        end
        default: st <= D_IDLE;  // D_DONE lasts one cycle
      endcase
    end
  end

  a_hold_offer: assert property (@(posedge clk) disable iff (!rst_n)
    dump_valid && !dump_ready |=> dump_valid && $stable(dump_line));

endmodule
