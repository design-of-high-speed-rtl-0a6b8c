// cla_adder: W-bit carry lookahead adder (W = 4 in the multiplier).
// W partial full adders produce per-bit propagate p[i] and generate g[i]; every
// carry is then formed directly in two-level sum-of-products form,
//   c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]...p[1]g[0] | p[i-1]...p[0]cin,
// so no carry ripples through the bit cells. sum = a + b + cin, cout = c[W].
// Combinational. The 4-bit width and the cin/cout pins follow the design; the
// lookahead equations are the standard ones, chosen here.
module cla_adder #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] p, g;
  logic [W:0]   c;

  for (genvar i = 0; i < W; i++) begin : g_bit
    partial_full_adder u_pfa (
      .a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .p(p[i]), .g(g[i])
    );
  end

  // Lookahead: each carry is an OR of product terms of p, g and cin only.
  always_comb begin
    c[0] = cin;
    for (int i = 1; i <= W; i++) begin
      logic term, acc;
      acc = 1'b0;
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        acc = acc | term;
      end
      term = cin;
      for (int k = 0; k < i; k++) term = term & p[k];
      c[i] = acc | term;
    end
  end

  assign cout = c[W];
endmodule
