// min_global_gap: running minimum of the Global Gap (minGlobalGap).
//
// The Global Gap between two adjacent stored intervals is the number of
// non-updated lines between them: start(i) - end(i-1) - 1. Intervals are
// presented in table order, one per cycle with en high; the unit keeps the
// end of the previous interval itself, so the memory needs only one read
// port. A strictly smaller gap replaces the minimum and records i-1, the
// lower interval of the pair (ties keep the lower pair). init restarts the
// scan (minimum all-ones, no previous interval); with en in the same cycle
// the presented interval is the first one.
module min_global_gap #(
  parameter int unsigned W  = 15,
  parameter int unsigned IW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          en,
  input  logic [W-1:0]  start_a,
  input  logic [W-1:0]  end_a,
  input  logic [IW-1:0] idx,
  output logic [W-1:0]  min_gap,
  output logic [IW-1:0] min_idx   // lower interval of the closest pair
);
  logic [W-1:0] prev_end, cand, base;
  logic         have_prev;

  always_comb begin
    cand = start_a - prev_end - 1'b1;
    base = init ? '1 : min_gap;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_gap   <= '1;
      min_idx   <= '0;
      prev_end  <= '0;
      have_prev <= 1'b0;
    end else begin
      if (en && have_prev && !init && (cand < base)) begin
        min_gap <= cand;
        min_idx <= idx - 1'b1;
      end else if (init) begin
        min_gap <= '1;
        min_idx <= '0;
      end
      if (en) begin
        prev_end  <= end_a;
        have_prev <= 1'b1;
      end else if (init) begin
        have_prev <= 1'b0;
      end
    end
  end
endmodule
