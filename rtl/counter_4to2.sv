// counter_4to2: 4-2 counter of one column.
//
// Five bits of equal weight -- four inputs x[3:0] and cin, the lateral carry
// from the column below -- are counted into s (weight 1) and two bits of
// weight 2: c, which goes to the next row of the next column, and cout, which
// goes to cin of the next column in the same row. It is built from two 3-2
// counters: the first adds x[0], x[1], x[2] and gives cout, the second adds
// its sum, x[3] and cin. cout does not depend on cin, so a row of 4-2
// counters has no carry ripple and its delay is that of two full adders.
// The source design names a 4-2 counter but gives no circuit; the two-adder
// form is this design's choice. Combinational.
//
// Invariant: x[0]+x[1]+x[2]+x[3]+cin = s + 2*(c + cout).
module counter_4to2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       s,
  output logic       c,
  output logic       cout
);

  logic s1;

  counter_3to2 u_fa1 (.a(x[0]), .b(x[1]), .c(x[2]), .s(s1), .co(cout));
  counter_3to2 u_fa2 (.a(s1),   .b(x[3]), .c(cin),  .s(s),  .co(c));

endmodule
