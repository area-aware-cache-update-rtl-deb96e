// check_interval: membership test of the newly updated line.
//
// Compares the line number with the interval on the table's read port and
// says whether the line lies inside it (start <= line <= end), below it or
// above it. "member" makes the controller abandon the request; "below"
// marks the first interval above the line, which is where a new interval
// would be inserted to keep the table sorted. Purely combinational.
module check_interval #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] line,
  input  logic [W-1:0] start_a,
  input  logic [W-1:0] end_a,
  output logic         member,
  output logic         below,   // line < start
  output logic         above     // line > end
);
  always_comb begin
    below = (line < start_a);
    above  = (line > end_a);
    member = !below && !above;
  end
endmodule
