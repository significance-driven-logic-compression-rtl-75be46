// fa_mirror_exact: the conventional 24-transistor mirror full adder, written
// at gate level.
//
// The mirror circuit first forms the inverted carry, then derives the sum
// from it, so the logic below follows the same two steps: carry is the
// majority of a, b and ci, and the sum is 1 when all three inputs are 1, or
// when at least one is 1 and the carry is 0. The result is the exact full
// adder: sum = a ^ b ^ ci, co = ab + b.ci + a.ci. Purely combinational.
module fa_mirror_exact (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);
  logic co_n;

  always_comb begin
    co_n = ~((a & b) | (ci & (a | b)));
    sum  = (a & b & ci) | (co_n & (a | b | ci));
    co   = ~co_n;
  end
endmodule
