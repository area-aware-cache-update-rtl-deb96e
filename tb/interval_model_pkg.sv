// interval_model_pkg: reference model of the Greedy Interval Table, used by
// the testbenches to work out expected results independently of the RTL.
//
// IntervalModel keeps the sorted list of intervals and applies one line
// update at a time with the same rules the hardware follows: drop a line
// already covered; with a free slot, extend an interval the line touches
// or store the line on its own; with a full table, extend the nearest
// interval when its Local Gap is below the smallest Global Gap, otherwise
// merge the closest pair and store the line on its own. Ties go to the
// lower interval. update() also returns the action taken and the number of
// controller cycles the hardware is expected to need for it.
package interval_model_pkg;

  typedef enum int {A_FIRST, A_DROP, A_EXTEND, A_INSERT, A_MERGE} action_e;

  class IntervalModel;
    int k;
    int s[$];
    int e[$];
    int moves;   // interval moves of the last update

    function new(int k_);
      k = k_;
    endfunction

    function void clear();
      s.delete();
      e.delete();
    endfunction

    function int count();
      return s.size();
    endfunction

    // Apply an update; cycles returns the expected controller cycles.
    function action_e update(int line, output int cycles);
      int n, q, loc, loc_i, glob, glob_i, d;
      bit loc_start;
      n = s.size();
      moves = 0;
      if (n == 0) begin
        s.push_back(line);
        e.push_back(line);
        cycles = 1;
        return A_FIRST;
      end
      q = n;
      loc = 1 << 30; loc_i = 0; loc_start = 0;
      glob = 1 << 30; glob_i = 0;
      for (int i = 0; i < n; i++) begin
        if (line >= s[i] && line <= e[i]) begin
          cycles = i + 1;
          return A_DROP;
        end
        if (line < s[i]) begin
          if (q == n) q = i;
          d = s[i] - line - 1;
          if (d < loc) begin loc = d; loc_i = i; loc_start = 1; end
        end else begin
          d = line - e[i] - 1;
          if (d < loc) begin loc = d; loc_i = i; loc_start = 0; end
        end
        if (i > 0) begin
          d = s[i] - e[i-1] - 1;
          if (d < glob) begin glob = d; glob_i = i - 1; end
        end
      end
      if (n < k && loc != 0) begin
        s.insert(q, line);
        e.insert(q, line);
        moves = n - q;
        cycles = (q == n) ? n + 2 : 2 * n - q + 1;
        return A_INSERT;
      end
      if (n == k && !(loc < glob)) begin
        e[glob_i] = e[glob_i + 1];
        s.delete(glob_i + 1);
        e.delete(glob_i + 1);
        moves = (q <= glob_i) ? glob_i - q : q - glob_i - 2;
        cycles = n + 3 + moves;
        if (q > glob_i) q = q - 1;
        s.insert(q, line);
        e.insert(q, line);
        return A_MERGE;
      end
      if (loc_start) s[loc_i] = line;
      else           e[loc_i] = line;
      cycles = n + 1;
      return A_EXTEND;
    endfunction

    // All line numbers covered, in table order.
    function void expand(ref int lines[$]);
      lines.delete();
      foreach (s[i])
        for (int l = s[i]; l <= e[i]; l++) lines.push_back(l);
    endfunction
  endclass

endpackage
