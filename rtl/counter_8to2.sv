// counter_8to2: one bit slice of the eight-input 4-2 tree.
//
// Reduces the eight bits x[7:0] of one column to a sum bit s (this column)
// and a carry bit c (next column). Two 4-2 counters take x[3:0] and x[7:4];
// a third 4-2 counter takes their two sums and the two first-level carries
// that the slice below produced (they have this column's weight). Placing
// the slices side by side gives the regular array the source design asks
// for: every column is the same slice.
//
// Lateral carries (all of weight "next column"):
//   co[0], co[1]: cout of the two first-level counters -> their cin above
//   co[2], co[3]: c    of the two first-level counters -> second level above
//   co[4]:        cout of the second-level counter      -> its cin above
// ci[4:0] takes the same signals from the slice below (zero at column 0).
//
// Invariant: sum(x) + ci[0]+ci[1]+ci[2]+ci[3]+ci[4] = s + 2*(c + sum(co)).
// Delay: two 4-2 levels, four full adders. Combinational.
module counter_8to2 (
  input  logic [7:0] x,
  input  logic [4:0] ci,
  output logic [4:0] co,
  output logic       s,
  output logic       c
);

  logic sa, sb;

  counter_4to2 u_l1a (.x(x[3:0]), .cin(ci[0]), .s(sa), .c(co[2]), .cout(co[0]));
  counter_4to2 u_l1b (.x(x[7:4]), .cin(ci[1]), .s(sb), .c(co[3]), .cout(co[1]));
  counter_4to2 u_l2  (.x({ci[3], ci[2], sb, sa}), .cin(ci[4]), .s(s), .c(c), .cout(co[4]));

endmodule
