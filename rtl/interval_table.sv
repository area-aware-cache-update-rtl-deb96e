// interval_table: the Interval Table I[k].
//
// A single-bank memory of K entries, each a <start, end> pair of line
// numbers, with one read port and one write port (the dual-ported memory
// of the Greedy hardware). The controller keeps the valid entries in
// slots 0 .. count-1, sorted by start address; the table itself holds no
// valid bits and needs no reset.
//
// Timing: the read is asynchronous (data follows rd_addr in the same
// cycle); a write takes effect at the clock edge, so a read of the slot
// being written returns the old value. Asynchronous read is this design's
// choice; it lets one entry be read, evaluated and rewritten per cycle.
module interval_table #(
  parameter int unsigned K  = 32,
  parameter int unsigned W  = 15,
  parameter int unsigned IW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic [IW-1:0] rd_addr,
  output logic [W-1:0]  rd_start,
  output logic [W-1:0]  rd_end,
  input  logic          we,
  input  logic [IW-1:0] wr_addr,
  input  logic [W-1:0]  wr_start,
  input  logic [W-1:0]  wr_end
);
  logic [2*W-1:0] mem [K];

  assign {rd_start, rd_end} = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= {wr_start, wr_end};
  end

endmodule
