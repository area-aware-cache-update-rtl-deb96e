// min_local_gap: running minimum of the Local Gap (minLocalGap).
//
// The Local Gap of the new line to an interval is the number of
// non-updated lines that extending the interval to the line would take
// in: start - line - 1 when the line is below the interval, line - end - 1
// when it is above. Each cycle with en high one interval is evaluated;
// a strictly smaller gap replaces the stored minimum together with the
// interval's index and the side to extend, so ties keep the lower index.
// init restarts the minimum at all-ones (no interval seen); init and en
// together evaluate the first interval of a new scan. An interval that
// holds the line (member) gives no candidate.
//
// Gaps are counted as zeros between the line and the interval, as in the
// worked examples (line 7 next to interval <9,10> has a Local Gap of 1).
module min_local_gap #(
  parameter int unsigned W  = 15,
  parameter int unsigned IW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          en,
  input  logic [W-1:0]  line,
  input  logic [W-1:0]  start_a,
  input  logic [W-1:0]  end_a,
  input  logic [IW-1:0] idx,
  output logic [W-1:0]  min_gap,
  output logic [IW-1:0] min_idx,
  output logic          min_ext_start  // 1: extend the start down to line
);
  logic [W-1:0] cand, base;
  logic         cand_ok, cand_start;

  always_comb begin
    cand_ok    = 1'b1;
    cand_start = 1'b0;
    cand       = '1;
    if (line < start_a) begin
      cand       = start_a - line - 1'b1;
      cand_start = 1'b1;
    end else if (line > end_a) begin
      cand       = line - end_a - 1'b1;
    end else begin
      cand_ok    = 1'b0;
    end
    base = init ? '1 : min_gap;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_gap       <= '1;
      min_idx       <= '0;
      min_ext_start <= 1'b0;
    end else if (en && cand_ok && (cand < base)) begin
      min_gap       <= cand;
      min_idx       <= idx;
      min_ext_start <= cand_start;
    end else if (init) begin
      min_gap       <= '1;
      min_idx       <= '0;
      min_ext_start <= 1'b0;
    end
  end
endmodule
