// counter_3to2: 3-2 counter (full adder).
//
// Counts the ones on three inputs of equal weight and gives the count in
// binary: s has weight 1, co weight 2. It is the basic cell of the 4-2 and
// 8-2 counters and of the 3-2 rows in the reduction tree. Combinational.
module counter_3to2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (a & c) | (b & c);
  end

endmodule
