// ut_pkg: constants and types shared by the cache Update Tracker.
//
// The defaults describe the recommended configuration: a Greedy Interval
// Table with k = 32 intervals over a 4 MB shared L2 of 32768 lines
// (15-bit line numbers) and a four-entry Update Buffer; and, for the
// distributed L2 (16 caches of 4096 lines each), one Greedy tracker with
// k = 4 per pair of caches under vertical sharing (c = 2).
// The write-operation and controller-state encodings are this design's
// own choice.
package ut_pkg;

  // Shared L2: 4 MB / 128 B per line = 32768 lines -> 15-bit line number.
  localparam int unsigned SHARED_LINE_W = 15;
  localparam int unsigned SHARED_K      = 32;
  localparam int unsigned BUF_DEPTH     = 4;

  // Distributed L2: 16 caches of 256 kB / 64 B per line = 4096 lines each.
  localparam int unsigned DIST_CACHES = 16;
  localparam int unsigned DIST_C      = 2;
  localparam int unsigned DIST_LINE_W = 12;
  localparam int unsigned DIST_K      = 4;

  // What the merge logic writes back into the Interval Table.
  typedef enum logic [2:0] {
    WR_NEW       = 3'd0,  // <line, line>: a new interval of its own
    WR_EXT_START = 3'd1,  // <line, end>: extend an interval downwards
    WR_EXT_END   = 3'd2,  // <start, line>: extend an interval upwards
    WR_MERGE     = 3'd3,  // <held start, end>: join two adjacent intervals
    WR_MOVE      = 3'd4   // copy an interval to a neighbouring slot
  } wr_op_e;

  // Greedy controller states.
  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,  // take a request, evaluate entry 0
    S_SCAN    = 3'd1,  // evaluate entries 1 .. count-1
    S_DECIDE  = 3'd2,  // extend, or start a merge / an insertion
    S_MERGE_B = 3'd3,  // second merge cycle: write the joined interval
    S_MOVE    = 3'd4,  // shift intervals to keep the table sorted
    S_INSERT  = 3'd5,  // write the new single-line interval
    S_DUMP    = 3'd6   // dumping logic owns the read port
  } ctrl_state_e;

endpackage
