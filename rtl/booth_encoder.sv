// booth_encoder: radix-4 (modified) Booth encoder for one digit.
//
// The multiplier Y is cut into overlapping three-bit groups
// {y[2i+1], y[2i], y[2i-1]} with y[-1] = 0, and each group stands for the
// digit d_i = y[2i-1] + y[2i] - 2*y[2i+1], one of -2, -1, 0, +1, +2, so that
// Y = sum_i d_i * 4^i. This block turns one group into the select signals of
// the partial-product multiplexer:
//   one  = y[2i] ^ y[2i-1]                         |d| = 1
//   two  = {y[2i+1],y[2i],y[2i-1]} is 100 or 011    |d| = 2
//   neg  = y[2i+1] & ~(y[2i] & y[2i-1])             d < 0
//   zero = all three bits equal                      d = 0
// The grouping and the digit formula follow the source design; the select
// equations are derived from that formula (neg is cleared for the group 111,
// which is digit 0, so that no +1 correction is added for it).
//
// Interface: trip = {y[2i+1], y[2i], y[2i-1]}; purely combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]  trip,
  output booth_sel_t  sel,
  output logic        zero
);

  always_comb begin
    sel.one = trip[1] ^ trip[0];
    sel.two = (trip[2] & ~trip[1] & ~trip[0]) | (~trip[2] & trip[1] & trip[0]);
    sel.neg = trip[2] & ~(trip[1] & trip[0]);
    zero    = (trip == 3'b000) || (trip == 3'b111);
  end

endmodule
