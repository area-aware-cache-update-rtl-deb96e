// update_buffer: the Update Buffer in front of the Greedy controller.
//
// A small first-word-fall-through FIFO of cache line numbers. The cache
// pushes the number of every line it writes; the controller pops one when
// it is free to process it. While the buffer is full (or the tracker is
// blocked for a dump) in_ready is low, which is the Busy signal that stalls
// the processor. The depth follows the recommended four entries; the
// valid/ready handshake and the FWFT organisation are this design's choice.
//
// Timing: a push is visible at out_* in the next cycle; push and pop may
// happen in the same cycle. A pop with out_valid low is ignored.
module update_buffer #(
  parameter int unsigned W     = 15,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         block,      // refuse pushes (dump in progress)
  input  logic         in_valid,
  input  logic [W-1:0] in_line,
  output logic         in_ready,
  output logic         out_valid,
  output logic [W-1:0] out_line,
  input  logic         out_pop,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [LW-1:0] cnt;
  logic          push, pop;

  assign in_ready  = (cnt != LW'(DEPTH)) && !block;
  assign out_valid = (cnt != '0);
  assign out_line  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_pop && out_valid;
  assign level     = cnt;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_line;
  end

  // A stalled request must be held until it is accepted.
  a_hold_stalled: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_line));

endmodule
