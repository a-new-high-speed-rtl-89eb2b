// booth_pkg: types and elaboration-time helpers shared by the radix-4 Booth
// multiplier.
//
// booth_sel_t is the select bundle one Booth encoder hands to one
// partial-product multiplexer: neg (digit is negative), two (|digit| = 2) and
// one (|digit| = 1). A zero digit has two = one = 0.
//
// tree_rows_after() gives the number of rows left after one level of the
// 4-2 counter reduction tree: every group of four rows becomes two, three
// left-over rows go through a 3-2 counter row and become two, one or two
// left-over rows pass unchanged. tree_levels() counts the 4-2 levels needed
// before at most eight rows remain for the final 8-2 counter slices.
package booth_pkg;

  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_sel_t;

  function automatic int tree_rows_after(input int rows);
    int rem;
    rem = rows % 4;
    return (rows / 4) * 2 + ((rem == 3) ? 2 : rem);
  endfunction

  function automatic int tree_levels(input int rows);
    int r;
    int l;
    r = rows;
    l = 0;
    while (r > 8) begin
      r = tree_rows_after(r);
      l++;
    end
    return l;
  endfunction

  // Rows entering level `lvl` (level 0 = the partial-product rows).
  function automatic int tree_rows_at(input int rows, input int lvl);
    int r;
    r = rows;
    for (int i = 0; i < lvl; i++) r = tree_rows_after(r);
    return r;
  endfunction

endpackage
