// partial_full_adder: the bit cell of the carry lookahead adder.
// From operand bits a, b and the incoming carry ci it forms the sum bit
// s = a XOR b XOR ci, and, for the lookahead logic, a generate g = a AND b and a
// propagate p. It does not form a carry out: the lookahead unit does that.
// The propagate is the inclusive one, p = a OR b; the carries it yields are the
// same as with p = a XOR b because g covers the case a = b = 1. Combinational.
module partial_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic p,
  output logic g
);
  always_comb begin
    s = a ^ b ^ ci;
    p = a | b;
    g = a & b;
  end
endmodule
