// cla_block: one carry-lookahead module of the final adder.
//
// Adds two B-bit slices with a carry-in. Every internal carry is formed
// directly from the bit generate (g = a & b) and propagate (p = a ^ b)
// signals and the carry-in, as a sum of products, so no carry ripples
// through the module:
//   c[j] = OR_{t<j} ( g[t] & AND_{t<u<j} p[u] )  |  ( AND_{u<j} p[u] & cin )
// The module also reports its group generate gg and group propagate gp, from
// which the next module's carry-in is formed without waiting for the sum.
// Combinational.
module cla_block #(
  parameter int B = 4
) (
  input  logic [B-1:0] a,
  input  logic [B-1:0] b,
  input  logic         cin,
  output logic [B-1:0] s,
  output logic         gg,
  output logic         gp
);

  logic [B-1:0] g, p;
  logic [B:0]   c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    for (int j = 0; j <= B; j++) begin
      logic term;
      logic run;
      // carry-in term: all propagates below j
      run  = cin;
      for (int u = 0; u < j; u++) run = run & p[u];
      c[j] = run;
      // generate terms
      for (int t = 0; t < j; t++) begin
        term = g[t];
        for (int u = t + 1; u < j; u++) term = term & p[u];
        c[j] = c[j] | term;
      end
    end
    s  = p ^ c[B-1:0];
    gp = &p;
    gg = 1'b0;
    for (int t = 0; t < B; t++) begin
      logic term;
      term = g[t];
      for (int u = t + 1; u < B; u++) term = term & p[u];
      gg = gg | term;
    end
  end

endmodule
