// booth_pp_mux: partial-product multiplexer of one radix-4 Booth digit.
//
// Selects 0, X or 2X from the N-bit two's complement multiplicand according
// to the digit's select bundle and, for a negative digit, inverts the
// selection. The +1 that completes the two's complement negation is not added
// here: the caller adds sel.neg at the row's least significant position (in
// this multiplier, through one extra row of the reduction tree).
//
// The result is PPW = N+2 bits wide, two bits wider than the multiplicand as
// in the source design: one bit is needed for 2X, the other carries the sign
// and keeps the row exact when it is sign-extended further.
//
// Interface: x (N bits), sel -> pp (N+2 bits); purely combinational.
module booth_pp_mux
  import booth_pkg::*;
#(
  parameter int N = 54
) (
  input  logic [N-1:0]   x,
  input  booth_sel_t     sel,
  output logic [N+1:0]   pp
);

  logic [N+1:0] xe;    // X sign-extended to N+2 bits
  logic [N+1:0] mag;   // 0, X or 2X

  always_comb begin
    xe = {{2{x[N-1]}}, x};
    unique case ({sel.two, sel.one})
      2'b01:   mag = xe;
      2'b10:   mag = {xe[N:0], 1'b0};
      default: mag = '0;
    endcase
    pp = sel.neg ? ~mag : mag;
  end

endmodule
