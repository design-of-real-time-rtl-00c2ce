// cla_adder: W-bit carry lookahead adder, the arithmetic core of the ALU.
//
// Every carry is formed directly from the bit generate (a&b) and propagate
// (a^b) terms and the carry-in, in the two-level sum-of-products form of a
// lookahead adder, so no carry waits for the one below it:
//   c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[0]cin.
// The document names a carry lookahead adder (13 ns in its 2 um process) but
// not its width or organisation; the width and the flat lookahead form are
// this design's choice. Purely combinational.
module cla_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    c = '0;
    c[0] = cin;
    for (int i = 0; i < W; i++) begin
      logic term, chain;
      // chain = p[i] & p[i-1] & ... & p[0]; term collects the generate paths
      term  = g[i];
      chain = p[i];
      for (int k = i - 1; k >= 0; k--) begin
        term  = term | (chain & g[k]);
        chain = chain & p[k];
      end
      c[i+1] = term | (chain & cin);
    end
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
