// vedic_mul4x4: 4x4-bit Vedic multiplier, s = a * b, purely combinational.
// The operands are split into 2-bit halves and multiplied crosswise:
//   q0 = a[1:0]*b[1:0] (v1)   q1 = a[3:2]*b[1:0] (v2)
//   q2 = a[1:0]*b[3:2] (v3)   q3 = a[3:2]*b[3:2] (v4)
// so that a*b = q0 + (q1 + q2)*4 + q3*16. Three 4-bit carry lookahead adders
// combine them:
//   c1: {ca1, m}  = q1 + q2                      middle cross terms
//   c2: {ca2, n}  = m + {2'b00, q0[3:2]}         s[3:2] = n[1:0]
//   c3: {w,  s[7:4]} = q3 + {1'b0, ca1|ca2, n[3:2]}
// and s[1:0] = q0[1:0]. ca1 and ca2 both weigh 2^6 in the product; they can
// never both be 1 (if q1+q2 >= 16 then m <= 2, and m + 3 < 16), so their OR is the
// single carry bit into position 2 of the third adder. That OR is this design's
// own: it makes the product exact for all 256 operand pairs. w, the third
// adder's carry out, is always 0 and is brought out as the ninth output.
// No clock and no register: the result settles after the 2x2 stage and three
// adder delays.
module vedic_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] s,
  output logic       w
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] m, n, hi_addend;
  logic       ca1, ca2;

  vedic2x2 v1 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic2x2 v2 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic2x2 v3 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic2x2 v4 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  cla_adder #(.W(4)) c1 (.a(q1), .b(q2), .cin(1'b0), .sum(m), .cout(ca1));
  cla_adder #(.W(4)) c2 (.a(m), .b({2'b00, q0[3:2]}), .cin(1'b0), .sum(n), .cout(ca2));

  assign hi_addend = {1'b0, ca1 | ca2, n[3:2]};

  cla_adder #(.W(4)) c3 (.a(q3), .b(hi_addend), .cin(1'b0), .sum(s[7:4]), .cout(w));

  assign s[3:2] = n[1:0];
  assign s[1:0] = q0[1:0];

  // The product of two 4-bit numbers never overflows 8 bits.
  always_comb assert (w == 1'b0)
    else $error("vedic_mul4x4: carry out of the third adder set");
  always_comb assert (!(ca1 && ca2))
    else $error("vedic_mul4x4: both middle carries set");
endmodule
