// merge_logic: forms every interval written back into the Interval Table.
//
// Depending on the controller's operation it produces a new single-line
// interval <line,line>, extends the interval on the read port down to the
// line or up to it, copies that interval unchanged (for the shifts that
// keep the table sorted), or joins two adjacent intervals. A merge takes
// two cycles: in the first the lower interval is on the read port and
// hold_en stores its start; in the second the upper interval is on the read
// port and <held start, upper end> is written.
module merge_logic
  import ut_pkg::*;
#(
  parameter int unsigned W = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  wr_op_e       op,
  input  logic         hold_en,
  input  logic [W-1:0] line,
  input  logic [W-1:0] rd_start,
  input  logic [W-1:0] rd_end,
  output logic [W-1:0] wr_start,
  output logic [W-1:0] wr_end
);
  logic [W-1:0] held_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       held_start <= '0;
    else if (hold_en) held_start <= rd_start;
  end

  always_comb begin
    unique case (op)
      WR_NEW:       begin wr_start = line;       wr_end = line;   end
      WR_EXT_START: begin wr_start = line;       wr_end = rd_end; end
      WR_EXT_END:   begin wr_start = rd_start;   wr_end = line;   end
      WR_MERGE:     begin wr_start = held_start; wr_end = rd_end; end
      default:      begin wr_start = rd_start;   wr_end = rd_end; end
    endcase
  end
endmodule
