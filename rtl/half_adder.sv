// half_adder: one-bit half adder, the adding cell of the 2x2 Vedic multiplier.
// sum = a XOR b, carry = a AND b. Purely combinational, no clock.
// The multiplier names two half adders per 2x2 stage; their logic here is the
// textbook one-bit half adder.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
