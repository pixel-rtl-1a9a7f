// cla_adder: N-bit carry-lookahead adder.
//
// Every carry is formed directly from the bit generate (a&b) and propagate
// (a^b) terms and the carry in, with no ripple between bits:
//   c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[0]cin.
// This flat lookahead is the structure whose gate count grows with the cube
// of the width, as the CLA cost model of the electrical processor assumes.
// The document gives only the cost model; the flat form is this design's choice.
// Purely combinational: sum and cout settle in the same cycle as a, b, cin.
module cla_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] g, p;
  logic [N:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    c[0] = cin;
    for (int i = 0; i < N; i++) begin
      logic term;
      logic chain;
      term  = 1'b0;
      chain = 1'b1;
      // walk down from bit i, keeping the AND of the propagates above bit k
      for (int k = i; k >= 0; k--) begin
        term  = term | (chain & g[k]);
        chain = chain & p[k];
      end
      c[i+1] = term | (chain & cin);
    end
  end

  assign sum  = p ^ c[N-1:0];
  assign cout = c[N];
endmodule
