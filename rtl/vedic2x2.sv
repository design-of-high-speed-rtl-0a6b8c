// vedic2x2: 2x2-bit multiplier by the vertical-and-crosswise (Urdhva-Tiryakbhyam) rule.
// Four AND gates form the partial products a0b0, a1b0, a0b1 and a1b1.
//   s0      = a0b0                   (vertical, right column)
//   {c1,s1} = a1b0 + a0b1            (crosswise, first half adder)
//   {c2,s2} = c1 + a1b1              (vertical, left column, second half adder)
// The product is p = {c2, s2, s1, s0}. Combinational, one AND plus two half-adder
// delays. The structure follows the design; port names are this module's own.
module vedic2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic s1, c1, s2, c2;

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  half_adder u_ha_cross (.a(a1b0), .b(a0b1), .sum(s1), .carry(c1));
  half_adder u_ha_left  (.a(c1),   .b(a1b1), .sum(s2), .carry(c2));

  assign p = {c2, s2, s1, a0b0};
endmodule
