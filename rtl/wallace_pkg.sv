// wallace_pkg: compile-time bookkeeping for the word-level Wallace tree.
//
// The tree takes its operand rows three at a time. Each group of three goes
// through one carry-save adder (CSA) and comes out as two rows. Rows left
// over (one or two) pass straight on to the next level. These functions give
// the row count at every level and the number of levels it takes to reach
// two rows, so wallace_tree can size its generate loops. For 32 partial
// products the counts are 32, 22, 15, 10, 7, 5, 4, 3, 2: eight CSA levels and
// 30 CSAs. For the 6-bit example they are 6, 4, 3, 2: three levels and four
// CSAs. All functions are constant functions, used only for elaboration.
package wallace_pkg;

  // Rows that remain after one level of 3:2 reduction.
  function automatic int unsigned rows_after(input int unsigned n);
    return (n / 3) * 2 + (n % 3);
  endfunction

  // Rows present at the input of a given level (level 0 = the partial products).
  function automatic int unsigned rows_at(input int unsigned n, input int unsigned level);
    int unsigned r;
    r = n;
    for (int unsigned i = 0; i < level; i++) begin
      if (r > 2) r = rows_after(r);
    end
    return r;
  endfunction

  // Number of CSA levels needed to bring n rows down to two.
  function automatic int unsigned tree_levels(input int unsigned n);
    int unsigned r;
    int unsigned l;
    r = n;
    l = 0;
    while (r > 2) begin
      r = rows_after(r);
      l++;
    end
    return l;
  endfunction

  // Index of the first row of a level in a flat array holding every level's
  // rows one after another.
  function automatic int unsigned row_offset(input int unsigned n, input int unsigned level);
    int unsigned o;
    o = 0;
    for (int unsigned i = 0; i < level; i++) o += rows_at(n, i);
    return o;
  endfunction

endpackage
