// cla_final_adder: two-step carry-lookahead adder for the two final operands.
//
// The W-bit operands are cut into modules of B bits (the last one shorter
// when B does not divide W). Step one: inside each module every carry is
// looked ahead from the bit generate/propagate signals (cla_block). Step
// two: the carry-in of module M_i is formed from the carry-out of M_{i-1}
// through that module's group signals, c_{i+1} = G_i | P_i & c_i, so a carry
// crosses a module in one AND-OR instead of B full adders. The two-step
// lookahead and the module-to-module carry follow the source design; the
// equal module size B = 4 is this design's choice (the source design
// mentions that unequal sizes can shorten the path further).
//
// Interface: s = (a + b + cin) mod 2^W, cout = carry out of bit W-1.
// Purely combinational.
module cla_final_adder #(
  parameter int W = 108,
  parameter int B = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int NM = (W + B - 1) / B;   // number of modules

  for (genvar i = 0; i < NM; i++) begin : g_mod
    localparam int LO = i * B;
    localparam int HI = ((i + 1) * B > W) ? W - 1 : (i + 1) * B - 1;
    localparam int BW = HI - LO + 1;

    wire ci;    // carry into this module
    wire co;    // carry out of this module
    wire gg, gp;

    if (i == 0) begin : g_ci
      assign ci = cin;
    end else begin : g_ci
      assign ci = g_mod[i-1].co;
    end

    cla_block #(.B(BW)) u_blk (
      .a  (a[HI:LO]),
      .b  (b[HI:LO]),
      .cin(ci),
      .s  (s[HI:LO]),
      .gg (gg),
      .gp (gp)
    );

    assign co = gg | (gp & ci);
  end

  assign cout = g_mod[NM-1].co;

endmodule
