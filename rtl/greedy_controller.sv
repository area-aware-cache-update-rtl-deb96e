// greedy_controller: the controller of the Greedy Interval Table tracker.
//
// For each line number taken from the Update Buffer it runs the Greedy
// online algorithm over the sorted Interval Table, one table entry per
// cycle on the single read port:
//   * Scan: entries 0 .. count-1 are read in order; check_interval,
//     min_local_gap and min_global_gap evaluate each one as it appears.
//     If the line is already inside an interval the request is dropped.
//     The first interval above the line gives the insert position q.
//   * Decide: with free slots a line that touches an interval (Local Gap 0)
//     extends it, any other line becomes an interval of its own. With a
//     full table the line extends its nearest interval when
//     minLocalGap < minGlobalGap; otherwise the two intervals around
//     minGlobalGap are merged and the line is stored on its own.
//   * Merge (2 cycles), Move (one interval per cycle) and Insert restore
//     the sorted order around the freed slot, as in the worked example of
//     merging <0,2> and <5,6> to make room for <14,14>.
// A dump request (pulse) blocks the buffer input, lets the requests
// already buffered finish, hands the read port to the dumping logic and
// empties the table when it is done.
//
// Timing: the first entry is evaluated in the cycle the request is taken
// (S_IDLE), so a request costs count cycles when it is dropped, count + 1
// when an interval is extended and at most 2k + 1 cycles in the worst case
// (full table: k scan + decide + second merge cycle + k - 2 moves +
// insert), the bound given for this hardware. The treatment of a table
// that is not yet full, the tie rules and the state encoding are this
// design's choices.
module greedy_controller
  import ut_pkg::*;
#(
  parameter int unsigned W  = 15,
  parameter int unsigned K  = 32,
  parameter int unsigned IW = (K > 1) ? $clog2(K) : 1,
  parameter int unsigned CW = $clog2(K+1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // Update Buffer
  input  logic          buf_valid,
  input  logic [W-1:0]  buf_line,
  output logic          buf_pop,
  output logic          buf_block,
  // Dump control
  input  logic          dump_req,
  output logic          dmp_start,
  input  logic          dmp_done,
  input  logic [IW-1:0] dmp_rd_idx,
  output logic          dump_done,
  // Interval Table
  output logic [IW-1:0] rd_addr,
  output logic          we,
  output logic [IW-1:0] wr_addr,
  output wr_op_e        wr_op,
  output logic          hold_en,
  // Gap and membership units
  output logic [W-1:0]  unit_line,
  output logic          unit_init,
  output logic          unit_en,
  output logic [IW-1:0] unit_idx,
  input  logic          is_member,
  input  logic          is_below,
  input  logic [W-1:0]  loc_min,
  input  logic [IW-1:0] loc_idx,
  input  logic          loc_ext_start,
  input  logic [W-1:0]  glob_min,
  input  logic [IW-1:0] glob_idx,
  // Status
  output logic [CW-1:0] count,
  output logic          idle
);
  ctrl_state_e   st, st_n;
  logic [W-1:0]  line_q;
  logic [CW-1:0] scan_idx, q, q_eff, mv_src, ins_pos, j_q;
  logic          q_found, mv_up, dump_pend;
  logic [CW-1:0] count_n, scan_idx_n, q_n, mv_src_n, ins_pos_n, j_n;
  logic          q_found_n, mv_up_n;
  logic          full;

  assign full      = (count == CW'(K));
  assign q_eff     = q_found ? q : count;
  assign unit_line = (st == S_IDLE) ? buf_line : line_q;
  assign buf_block = dump_pend;
  assign idle      = (st == S_IDLE) && !buf_valid && !dump_pend;

  always_comb begin
    st_n       = st;
    count_n    = count;
    scan_idx_n = scan_idx;
    q_n        = q;
    q_found_n  = q_found;
    mv_src_n   = mv_src;
    mv_up_n    = mv_up;
    ins_pos_n  = ins_pos;
    j_n        = j_q;
    buf_pop    = 1'b0;
    dmp_start  = 1'b0;
    rd_addr    = '0;
    we         = 1'b0;
    wr_addr    = '0;
    wr_op      = WR_MOVE;
    hold_en    = 1'b0;
    unit_init  = 1'b0;
    unit_en    = 1'b0;
    unit_idx   = '0;

    unique case (st)
      S_IDLE: begin
        if (buf_valid) begin
          buf_pop = 1'b1;
          if (count == '0) begin
            we      = 1'b1;
            wr_addr = '0;
            wr_op   = WR_NEW;
            count_n = CW'(1);
          end else begin
            rd_addr   = '0;
            unit_init = 1'b1;
            unit_en   = 1'b1;
            unit_idx  = '0;
            q_found_n = is_below;
            q_n       = '0;
            if (is_member)               st_n = S_IDLE;
            else if (count == CW'(1))    st_n = S_DECIDE;
            else begin
              scan_idx_n = CW'(1);
              st_n       = S_SCAN;
            end
          end
        end else if (dump_pend) begin
          dmp_start = 1'b1;
          st_n      = S_DUMP;
        end
      end

      S_SCAN: begin
        rd_addr  = IW'(scan_idx);
        unit_en  = 1'b1;
        unit_idx = IW'(scan_idx);
        if (!q_found && is_below) begin
          q_found_n = 1'b1;
          q_n       = scan_idx;
        end
        if (is_member)                     st_n = S_IDLE;
        else if (scan_idx == count - 1'b1) st_n = S_DECIDE;
        else                               scan_idx_n = scan_idx + 1'b1;
      end

      S_DECIDE: begin
        q_n = q_eff;
        if (!full && loc_min != '0) begin
          // Free slot: store the line as an interval of its own at q.
          count_n = count + 1'b1;
          if (q_eff == count) begin
            ins_pos_n = count;
            st_n      = S_INSERT;
          end else begin
            rd_addr = IW'(count - 1'b1);
            we      = 1'b1;
            wr_addr = IW'(count);
            wr_op   = WR_MOVE;
            if (count - 1'b1 == q_eff) begin
              ins_pos_n = q_eff;
              st_n      = S_INSERT;
            end else begin
              mv_src_n = count - CW'(2);
              mv_up_n  = 1'b1;
              st_n     = S_MOVE;
            end
          end
        end else if (full && !(loc_min < glob_min)) begin
          // Merge the two intervals around minGlobalGap: first cycle.
          rd_addr = glob_idx;
          hold_en = 1'b1;
          j_n     = CW'(glob_idx);
          st_n    = S_MERGE_B;
        end else begin
          // Extend the nearest interval to take in the line.
          rd_addr = loc_idx;
          we      = 1'b1;
          wr_addr = loc_idx;
          wr_op   = loc_ext_start ? WR_EXT_START : WR_EXT_END;
          st_n    = S_IDLE;
        end
      end

      S_MERGE_B: begin
        rd_addr = IW'(j_q + 1'b1);
        we      = 1'b1;
        wr_op   = WR_MERGE;
        if (q <= j_q) begin
          // Line goes below the pair: joined interval into the upper slot.
          wr_addr = IW'(j_q + 1'b1);
          if (q == j_q) begin
            ins_pos_n = q;
            st_n      = S_INSERT;
          end else begin
            mv_src_n = j_q - 1'b1;
            mv_up_n  = 1'b1;
            st_n     = S_MOVE;
          end
        end else begin
          // Line goes above the pair: joined interval into the lower slot.
          wr_addr = IW'(j_q);
          if (q == j_q + CW'(2)) begin
            ins_pos_n = j_q + 1'b1;
            st_n      = S_INSERT;
          end else begin
            mv_src_n = j_q + CW'(2);
            mv_up_n  = 1'b0;
            st_n     = S_MOVE;
          end
        end
      end

      S_MOVE: begin
        rd_addr = IW'(mv_src);
        we      = 1'b1;
        wr_op   = WR_MOVE;
        if (mv_up) begin
          wr_addr = IW'(mv_src + 1'b1);
          if (mv_src == q) begin
            ins_pos_n = q;
            st_n      = S_INSERT;
          end else mv_src_n = mv_src - 1'b1;
        end else begin
          wr_addr = IW'(mv_src - 1'b1);
          if (mv_src == q - 1'b1) begin
            ins_pos_n = q - 1'b1;
            st_n      = S_INSERT;
          end else mv_src_n = mv_src + 1'b1;
        end
      end

      S_INSERT: begin
        we      = 1'b1;
        wr_addr = IW'(ins_pos);
        wr_op   = WR_NEW;
        st_n    = S_IDLE;
      end

      S_DUMP: begin
        rd_addr = dmp_rd_idx;
        if (dmp_done) begin
          count_n = '0;
          st_n    = S_IDLE;
        end
      end

      default: st_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      count     <= '0;
      line_q    <= '0;
      scan_idx  <= '0;
      q         <= '0;
      q_found   <= 1'b0;
      mv_src    <= '0;
      mv_up     <= 1'b0;
      ins_pos   <= '0;
      j_q       <= '0;
      dump_pend <= 1'b0;
      dump_done <= 1'b0;
    end else begin
      st        <= st_n;
      count     <= count_n;
      scan_idx  <= scan_idx_n;
      q         <= q_n;
      q_found   <= q_found_n;
      mv_src    <= mv_src_n;
      mv_up     <= mv_up_n;
      ins_pos   <= ins_pos_n;
      j_q       <= j_n;
      if (st == S_IDLE && buf_valid) line_q <= buf_line;
      dump_done <= (st == S_DUMP) && dmp_done;
      if (dump_req)                        dump_pend <= 1'b1;
      else if ((st == S_DUMP) && dmp_done) dump_pend <= 1'b0;
    end
  end

  // With a full table a line lying between the two closest intervals is
  // always nearer to one of them than they are to each other, so a merge
  // never has to place the line between the merged pair.
  a_merge_position: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_MERGE_B) |-> (q != j_q + 1'b1));
  a_write_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> (int'(wr_addr) < int'(K)));
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(count) <= int'(K));

endmodule
